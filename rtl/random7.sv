// random7: 7-bit linear feedback shift register (Fibonacci form).
//
// Stages R1..R7 are bits q[0]..q[6]. On every clock with step high the
// register shifts one place towards R7 and R1 takes the feedback
// R6 xor R7, the maximal-length polynomial x^7 + x^6 + 1, so the register
// walks through all 127 non-zero states before repeating. Three instances
// with different seeds supply, for each of the seven gene multiplexers, one
// select bit each.
// A 7-stage LFSR with feedback into R1 is the published structure; the tap
// positions, the seed parameter and the step enable are this design's
// choices. Reset loads SEED (must be non-zero); if the register were ever
// all-zero it reloads SEED so it cannot lock up.
module random7 #(
  parameter logic [6:0] SEED = 7'h01
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       step,
  output logic [6:0] q
);
  always_ff @(posedge clk) begin
    if (rst || q == '0) q <= SEED;
    else if (step)      q <= {q[5:0], q[5] ^ q[6]};
  end

  initial assert (SEED != '0) else $error("random7: SEED must be non-zero");
endmodule
