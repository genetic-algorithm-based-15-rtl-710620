// she_pwm_gen: SHE PWM gate-pulse generator for the 15-level inverter.
//
// At the start of every fundamental cycle (cycle_start) the seven winner
// angles are latched and converted to switching instants counted in time-base
// ticks, t_k = round(theta_k * TICKS_PER_CYCLE / 36000). Within the cycle,
// pos (the tick index from the 1 MHz time base) is reduced to the position
// q within the current half cycle and the staircase level is
//     L(q) = number of k with t_k <= q < HALF - t_k,     0..7,
// which rises at theta1..theta7 and falls at pi-theta7..pi-theta1 (quarter-
// wave symmetry), and repeats with opposite polarity in the second half.
// Gates follow the switching table of the inverter:
//   S1 = L[0], S2 = L[1], S3 = L[2]   (sources Vdc, 2Vdc, 4Vdc in series)
//   H1 = H3 = 1 in the positive half cycle, H2 = H4 = 1 in the negative half.
// Over each half cycle S1, S2 and S3 change state 14, 6 and 2 times and each
// H switch once. Outputs are registered (one clock after pos). Until the
// first cycle_start with angles_valid high, every switch is held off.
// The level coding, the H-bridge polarity rule and the symmetry are the
// published design; the tick conversion, the hold-off before valid angles
// and the absence of dead time (none is described) are this design's choices.
module she_pwm_gen
  import she_pkg::*;
#(
  parameter int unsigned TICKS_PER_CYCLE = 20_000,
  localparam int unsigned PW = $clog2(TICKS_PER_CYCLE)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cycle_start,    // last clock of a fundamental cycle
  input  logic [PW-1:0] pos,            // tick index within the cycle
  input  logic          angles_valid,
  input  angle_t        angle [N_ANGLES],
  output gates_t        gates,
  output logic [2:0]    level,          // |output level| in units of Vdc
  output logic          active          // angles latched, gates running
);
  localparam int unsigned HALF = TICKS_PER_CYCLE / 2;

  logic [PW-1:0] tsw [N_ANGLES];        // switching instants, ticks

  // round(theta * TICKS_PER_CYCLE / 36000). The division by 36000 is a
  // multiplication by ceil(2^48 / 36000) and a 48-bit shift, which is exact
  // for every dividend below 2^48 / 36000.
  localparam logic [32:0] INV_TURN = 33'd7818749354;
  function automatic logic [PW-1:0] to_ticks(angle_t a);
    logic [31:0] num;
    logic [64:0] prod;
    num  = 32'(a) * TICKS_PER_CYCLE + FULL_TURN_CDEG / 2;
    prod = 65'(num) * 65'(INV_TURN);
    return PW'(prod >> 48);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      for (int k = 0; k < N_ANGLES; k++) tsw[k] <= '0;
    end else if (cycle_start) begin
      active <= angles_valid;
      for (int k = 0; k < N_ANGLES; k++) tsw[k] <= to_ticks(angle[k]);
    end
  end

  logic          neg_half;
  logic [PW-1:0] q;
  logic [2:0]    lvl;
  always_comb begin
    neg_half = (pos >= PW'(HALF));
    q        = neg_half ? pos - PW'(HALF) : pos;
    lvl      = '0;
    for (int k = 0; k < N_ANGLES; k++)
      if (q >= tsw[k] && q < PW'(HALF) - tsw[k]) lvl = lvl + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || !active) begin
      gates <= '0;
      level <= '0;
    end else begin
      level    <= lvl;
      gates.s1 <= lvl[0];
      gates.s2 <= lvl[1];
      gates.s3 <= lvl[2];
      gates.h1 <= !neg_half;
      gates.h3 <= !neg_half;
      gates.h2 <= neg_half;
      gates.h4 <= neg_half;
    end
  end

  // The two legs of the H-bridge must never conduct together.
  assert property (@(posedge clk) disable iff (rst) !(gates.h1 && gates.h4) && !(gates.h2 && gates.h3));
endmodule
