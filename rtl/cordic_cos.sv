// cordic_cos: iterative CORDIC cosine.
//
// Computes cos(2*pi*phase/2^20) for a 20-bit binary phase (a full turn is
// 2^20). The phase is first folded into [-pi/2, pi/2): phases in the second
// and third quadrants are moved by half a turn and the result negated. Then
// ITER rotation-mode CORDIC iterations run, one per clock, starting from
// x = K (the CORDIC gain, 0.607253 in Q2.18) and y = 0. The result is given
// in Q1.15 (32768 = 1.0), accurate to a few LSB.
// Timing: pulse start with phase valid; done pulses ITER+1 clocks later
// with cos_q15 valid, held until the next start. start while busy is
// ignored. Helper of the THD fitness unit; the CORDIC method itself is this
// design's choice for evaluating the harmonic equations in hardware.
module cordic_cos #(
  parameter int unsigned ITER = 18
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic        [19:0] phase,
  output logic               done,
  output logic signed [16:0] cos_q15
);
  localparam int XW = 21;  // Q2.18 plus sign

  // atan(2^-i) in units of 2^-20 turn: round(atan(2^-i) / (2*pi) * 2^20).
  localparam int ATAN [18] = '{131072, 77376, 40884, 20753, 10417, 5213, 2607,
                               1304, 652, 326, 163, 81, 41, 20, 10, 5, 3, 1};
  localparam logic signed [XW-1:0] K_GAIN = 21'sd159188;  // 0.607253 * 2^18

  logic signed [XW-1:0] x, y;
  logic signed [20:0]   z;       // residual angle, 2^-20 turn units
  logic                 neg, busy;
  logic [4:0]           i;

  // Fold the phase into [-pi/2, pi/2).
  logic        fold;
  logic [19:0] ph_f;
  assign fold = phase[19] ^ phase[18];
  assign ph_f = fold ? (phase ^ 20'h80000) : phase;

  logic signed [XW-1:0] xs, ys;
  assign xs = x >>> i;
  assign ys = y >>> i;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      cos_q15 <= '0;
      x <= '0; y <= '0; z <= '0; i <= '0; neg <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          x    <= K_GAIN;
          y    <= '0;
          z    <= {ph_f[19], ph_f};     // sign-extend the folded phase
          neg  <= fold;
          i    <= '0;
        end
      end else if (i == 5'(ITER)) begin
        busy    <= 1'b0;
        done    <= 1'b1;
        // Q2.18 -> Q1.15 with rounding, then apply the quadrant sign.
        cos_q15 <= neg ? -17'((x + 21'sd4) >>> 3) : 17'((x + 21'sd4) >>> 3);
      end else begin
        if (z >= 0) begin
          x <= x - ys;
          y <= y + xs;
          z <= z - 21'(ATAN[i]);
        end else begin
          x <= x + ys;
          y <= y - xs;
          z <= z + 21'(ATAN[i]);
        end
        i <= i + 1'b1;
      end
    end
  end

  initial assert (ITER >= 1 && ITER <= 18) else $error("cordic_cos: ITER must be 1..18");
endmodule
