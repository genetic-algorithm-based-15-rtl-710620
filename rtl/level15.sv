// level15: FPGA controller of the 15-level SHE PWM inverter.
//
// Structure (instance names as in the published block diagram):
//   X50    clock50hz_gen  50 MHz -> 50 Hz fundamental-cycle tick
//   X      clock1mhz_gen  50 MHz -> 1 MHz tick and tick index in the cycle
//   X2_0   random7        LFSR1, stages R1..R7
//   X2_1   random7        LFSR2, stages S1..S7
//   X2_2   random7        LFSR3, stages T1..T7
//   X3     ga_algorithms  band multiplexers, THD fitness, best selection and
//                         SHE PWM gate generation
// After reset the GA runs GENERATIONS evaluations on the board clock
// (milliseconds), then from the next 50 Hz cycle boundary on the gates
// s1..s3, h1..h4 run the winning switching pattern every cycle.
// All logic is on the single board clock; the divided clocks are enables.
// The three LFSR seeds are this design's choice (distinct and non-zero, so
// the three select bits of each multiplexer differ).
module level15
  import she_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned FOUT_HZ     = 50,
  parameter int unsigned TICK_HZ     = 1_000_000,
  parameter int unsigned GENERATIONS = 127,
  parameter int unsigned MAX_ORDER   = 39,
  parameter logic [6:0]  SEED_R      = 7'h01,
  parameter logic [6:0]  SEED_S      = 7'h2A,
  parameter logic [6:0]  SEED_T      = 7'h5C,
  localparam int unsigned TPC = TICK_HZ / FOUT_HZ,
  localparam int unsigned PW  = $clog2(TPC),
  localparam int unsigned GW  = $clog2(GENERATIONS + 1)
) (
  input  logic          clk_50mhz,
  input  logic          rst,
  output gates_t        gates,
  output logic [2:0]    level,
  output logic          clk_50hz,
  output logic          clk_1mhz,
  output logic          cycle_start,
  output logic [PW-1:0] pos,
  output logic          pwm_active,
  output logic          search_done,
  output logic          improved,
  output logic          lfsr_step,
  output logic [GW-1:0] generation,
  output angle_t        winner [N_ANGLES],
  output gene_sel_t     winner_gene [N_ANGLES],
  output logic [47:0]   best_fund_pow,
  output logic [47:0]   best_harm_pow
);
  logic       tick_1mhz;
  logic [6:0] r, s, t;

  clock50hz_gen #(.CLK_HZ(CLK_HZ), .FOUT_HZ(FOUT_HZ)) X50 (
    .clk(clk_50mhz), .rst, .cycle_tick(cycle_start), .clk_out(clk_50hz)
  );

  clock1mhz_gen #(.CLK_HZ(CLK_HZ), .TICK_HZ(TICK_HZ), .FOUT_HZ(FOUT_HZ)) X (
    .clk(clk_50mhz), .rst, .sync(cycle_start), .tick(tick_1mhz), .clk_out(clk_1mhz), .pos
  );

  random7 #(.SEED(SEED_R)) X2_0 (.clk(clk_50mhz), .rst, .step(lfsr_step), .q(r));
  random7 #(.SEED(SEED_S)) X2_1 (.clk(clk_50mhz), .rst, .step(lfsr_step), .q(s));
  random7 #(.SEED(SEED_T)) X2_2 (.clk(clk_50mhz), .rst, .step(lfsr_step), .q(t));

  ga_algorithms #(
    .GENERATIONS(GENERATIONS), .MAX_ORDER(MAX_ORDER), .TICKS_PER_CYCLE(TPC)
  ) X3 (
    .clk(clk_50mhz), .rst,
    .rnd_r(r), .rnd_s(s), .rnd_t(t), .lfsr_step,
    .cycle_start, .pos,
    .gates, .level, .pwm_active, .search_done, .improved, .generation,
    .winner, .winner_gene, .best_fund_pow, .best_harm_pow
  );

  // The time base is observed only through pos.
  logic unused_tick;
  assign unused_tick = tick_1mhz;
endmodule
