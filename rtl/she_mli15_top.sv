// she_mli15_top: complete SHE PWM 15-level inverter scheme.
//
// The FPGA controller level15 searches the offline band of switching angles
// with an LFSR-driven genetic algorithm, keeps the chromosome of lowest
// THD, and drives the gate signals of the asymmetric 15-level inverter every
// 50 Hz cycle. The power stage is the behavioural model mli15_inverter,
// whose load voltage v_load, load current i_load and signed level are
// brought out. Apart
// from that model everything is synthesizable and clocked by the 50 MHz
// board clock; parameters pass through to level15.
module she_mli15_top
  import she_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned FOUT_HZ     = 50,
  parameter int unsigned TICK_HZ     = 1_000_000,
  parameter int unsigned GENERATIONS = 127,
  parameter int unsigned MAX_ORDER   = 39,
  localparam int unsigned TPC = TICK_HZ / FOUT_HZ,
  localparam int unsigned PW  = $clog2(TPC),
  localparam int unsigned GW  = $clog2(GENERATIONS + 1)
) (
  input  logic              clk_50mhz,
  input  logic              rst,
  output gates_t            gates,
  output logic              clk_50hz,
  output logic              clk_1mhz,
  output logic              cycle_start,
  output logic [PW-1:0]     pos,
  output logic              pwm_active,
  output logic              search_done,
  output logic              improved,
  output logic              lfsr_step,
  output logic [GW-1:0]     generation,
  output angle_t            winner [N_ANGLES],
  output gene_sel_t         winner_gene [N_ANGLES],
  output logic [47:0]       best_fund_pow,
  output logic [47:0]       best_harm_pow,
  output real               v_load,
  output real               i_load,
  output logic signed [3:0] level,
  output logic              shoot_through
);
  logic [2:0] level_mag;

  level15 #(
    .CLK_HZ(CLK_HZ), .FOUT_HZ(FOUT_HZ), .TICK_HZ(TICK_HZ),
    .GENERATIONS(GENERATIONS), .MAX_ORDER(MAX_ORDER)
  ) u_ctrl (
    .clk_50mhz, .rst, .gates, .level(level_mag), .clk_50hz, .clk_1mhz, .cycle_start, .pos,
    .pwm_active, .search_done, .improved, .lfsr_step, .generation,
    .winner, .winner_gene, .best_fund_pow, .best_harm_pow
  );

  mli15_inverter u_inv (.gates, .v_load, .i_load, .level, .shoot_through);

  // The controller's level magnitude and the inverter's level must agree.
  assert property (@(posedge clk_50mhz) disable iff (rst)
    pwm_active |-> level_mag == 3'(level < 0 ? -level : level));
endmodule
