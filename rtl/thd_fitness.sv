// thd_fitness: THD fitness of one chromosome (set of seven switching angles).
//
// A quarter-wave-symmetric staircase with unit steps at theta1..theta7 has
// only odd harmonics, of amplitude proportional to
//     V_h  ~  (1/h) * sum_k cos(h * theta_k),   h = 1, 3, 5, ...
// This unit computes
//     fund_pow = V_1^2                        (Q30, 2^30 = 1.0)
//     harm_pow = sum_{h=3,5..MAX_ORDER} V_h^2 (Q30)
// so that THD^2 = harm_pow / fund_pow. The GA compares candidates by
// cross-multiplication and needs no divider. Each cosine comes from the
// iterative CORDIC helper; the angle h*theta is turned into a 20-bit binary
// phase by multiplying by round(2^40 / 36000) and keeping bits [39:20],
// which also performs the reduction modulo one turn. 1/h is a constant
// table round(2^16 / h).
// Timing: pulse start with the angles valid (they are latched). The unit
// evaluates (MAX_ORDER+1)/2 harmonics x 7 angles cosines of about ITER+3
// clocks each (about 2,900 clocks at the defaults); done pulses for one clock
// when fund_pow and harm_pow are valid; they hold until the next start.
// THD as the fitness function is the published method; the harmonic range,
// the CORDIC evaluation and the fixed-point formats are this design's
// choices.
module thd_fitness
  import she_pkg::*;
#(
  parameter int unsigned MAX_ORDER = 39,   // highest odd harmonic included
  parameter int unsigned ITER      = 18    // CORDIC iterations
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  angle_t       angle [N_ANGLES],
  output logic         busy,
  output logic         done,
  output logic [47:0]  fund_pow,
  output logic [47:0]  harm_pow
);
  localparam int unsigned NH = (MAX_ORDER + 1) / 2;   // harmonics 1,3,..,MAX_ORDER
  localparam int unsigned HW = $clog2(NH);           // hi counts 0..NH-1
  localparam logic [24:0] K_TURN = 25'd30541990;      // round(2^40 / 36000)

  typedef enum logic [2:0] {S_IDLE, S_COS, S_WAIT, S_HARM, S_DONE} state_t;
  state_t state;

  angle_t              ang [N_ANGLES];
  logic [HW-1:0]       hi;            // harmonic index, h = 2*hi + 1
  logic [2:0]          k;             // angle index
  logic signed [19:0]  acc;           // sum_k cos(h*theta_k), Q15

  // 1/h table, Q16.
  logic [16:0] recip [NH];
  for (genvar j = 0; j < NH; j++) begin : g_recip
    assign recip[j] = 17'((65536 + (2 * j + 1) / 2) / (2 * j + 1));
  end

  // Phase of h*theta_k.
  logic [5:0]  h;
  logic [19:0] h_theta;
  logic [19:0] phase;
  assign h       = 6'(2 * hi + 1);
  assign h_theta = 20'(h * ang[k]);
  assign phase   = 20'((45'(h_theta) * 45'(K_TURN)) >> 20);   // bits [39:20]

  logic               c_start, c_done;
  logic signed [16:0] c_cos;

  cordic_cos #(.ITER(ITER)) u_cordic (
    .clk, .rst, .start(c_start), .phase(phase), .done(c_done), .cos_q15(c_cos)
  );

  assign c_start = (state == S_COS);
  assign busy    = (state != S_IDLE);

  // V_h = acc / h in Q15, then squared to Q30.
  logic signed [37:0] scaled;
  logic signed [20:0] vh;
  logic        [41:0] vh_sq;
  assign scaled = acc * $signed({1'b0, recip[hi]});
  assign vh     = 21'(scaled >>> 16);
  assign vh_sq  = 42'(vh * vh);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      hi       <= '0;
      k        <= '0;
      acc      <= '0;
      fund_pow <= '0;
      harm_pow <= '0;
      for (int a = 0; a < N_ANGLES; a++) ang[a] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ang      <= angle;
          hi       <= '0;
          k        <= '0;
          acc      <= '0;
          harm_pow <= '0;
          state    <= S_COS;
        end
        S_COS: state <= S_WAIT;
        S_WAIT: if (c_done) begin
          acc <= acc + 20'(c_cos);
          if (k == 3'(N_ANGLES - 1)) begin
            k     <= '0;
            state <= S_HARM;
          end else begin
            k     <= k + 1'b1;
            state <= S_COS;
          end
        end
        S_HARM: begin
          if (hi == '0) fund_pow <= 48'(vh_sq);
          else          harm_pow <= harm_pow + 48'(vh_sq);
          acc <= '0;
          if (hi == HW'(NH - 1)) state <= S_DONE;
          else begin
            hi    <= hi + 1'b1;
            state <= S_COS;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (MAX_ORDER >= 3 && MAX_ORDER % 2 == 1 && MAX_ORDER <= 63)
    else $error("thd_fitness: MAX_ORDER must be odd, 3..63");
endmodule
