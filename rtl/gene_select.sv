// gene_select: band memory and random-search multiplexers.
//
// Holds the offline-computed band of switching angles (she_pkg::BAND, seven
// angles by eight candidate genes G1..G8) and seven 8x1 multiplexers. The
// multiplexer of angle k (k = 1..7) is steered by bit k of each of the three
// LFSRs: select = {R_k, S_k, T_k}, a value 0..7 that picks gene G(select+1).
// The output is one chromosome, a complete set theta1..theta7 in
// centidegrees. Because the bands of neighbouring angles do not overlap,
// every chromosome satisfies theta1 < theta2 < ... < theta7 < 90 degrees.
// Purely combinational; the result is valid in the same cycle as the LFSR
// state.
// The table values, the seven 8x1 multiplexers and the one-bit-per-LFSR
// select wiring are the published design; the bit order within the select
// (R most significant) is this design's choice.
module gene_select
  import she_pkg::*;
(
  input  logic [N_ANGLES-1:0] r,     // LFSR1 stages R1..R7
  input  logic [N_ANGLES-1:0] s,     // LFSR2 stages S1..S7
  input  logic [N_ANGLES-1:0] t,     // LFSR3 stages T1..T7
  output gene_sel_t           sel   [N_ANGLES],
  output angle_t              angle [N_ANGLES]
);
  always_comb begin
    for (int k = 0; k < N_ANGLES; k++) begin
      sel[k]   = {r[k], s[k], t[k]};
      angle[k] = BAND[k][sel[k]];
    end
  end
endmodule
