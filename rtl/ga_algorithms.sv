// ga_algorithms: LFSR-driven genetic search for the switching angles, and
// the SHE PWM gate generator that uses its result.
//
// Search (one generation per chromosome):
//   1. the three LFSR states select one chromosome from the angle band
//      (gene_select: seven 8x1 multiplexers over the offline band);
//   2. thd_fitness computes its fundamental and harmonic power;
//   3. survivor selection: the chromosome replaces the best so far if its
//      THD is lower, tested without division as
//          harm_new * fund_best < harm_best * fund_new;
//   4. the LFSRs are stepped once (lfsr_step) to produce the next, mutated
//      chromosome.
// After GENERATIONS chromosomes the search terminates, search_done rises
// and stays high, and the best chromosome is the winner. From the next
// fundamental-cycle start on, she_pwm_gen produces the inverter gate
// signals from the winner; before that all switches are off.
// Timing: one generation takes one thd_fitness evaluation plus 2 clocks
// (about 2,900 clocks at the defaults, so 127 generations take about 7.4 ms
// of a 50 MHz clock). improved pulses for one clock whenever the best
// chromosome is replaced.
// The flow (band initialisation, THD evaluation, LFSR random search,
// selection of the best by THD, termination) is the published method. The
// number of generations, the strict-improvement rule and the one-shot search
// after reset are this design's choices.
module ga_algorithms
  import she_pkg::*;
#(
  parameter int unsigned GENERATIONS     = 127,
  parameter int unsigned MAX_ORDER       = 39,
  parameter int unsigned ITER            = 18,
  parameter int unsigned TICKS_PER_CYCLE = 20_000,
  localparam int unsigned PW = $clog2(TICKS_PER_CYCLE),
  localparam int unsigned GW = $clog2(GENERATIONS + 1)
) (
  input  logic                clk,
  input  logic                rst,
  // LFSR interface
  input  logic [N_ANGLES-1:0] rnd_r,
  input  logic [N_ANGLES-1:0] rnd_s,
  input  logic [N_ANGLES-1:0] rnd_t,
  output logic                lfsr_step,
  // time base
  input  logic                cycle_start,
  input  logic [PW-1:0]       pos,
  // results
  output gates_t              gates,
  output logic [2:0]          level,
  output logic                pwm_active,
  output logic                search_done,
  output logic                improved,
  output logic [GW-1:0]       generation,
  output angle_t              winner [N_ANGLES],
  output gene_sel_t           winner_gene [N_ANGLES],   // gene index 0..7 = G1..G8
  output logic [47:0]         best_fund_pow,
  output logic [47:0]         best_harm_pow
);
  typedef enum logic [1:0] {G_START, G_EVAL, G_WAIT, G_DONE} gstate_t;
  gstate_t state;

  angle_t    cand [N_ANGLES];
  gene_sel_t sel  [N_ANGLES];

  gene_select u_select (.r(rnd_r), .s(rnd_s), .t(rnd_t), .sel(sel), .angle(cand));

  logic        fit_start, fit_busy, fit_done;
  logic [47:0] fund_pow, harm_pow;

  thd_fitness #(.MAX_ORDER(MAX_ORDER), .ITER(ITER)) u_fitness (
    .clk, .rst, .start(fit_start), .angle(cand), .busy(fit_busy), .done(fit_done),
    .fund_pow, .harm_pow
  );

  logic        have_best, better;
  logic [95:0] lhs, rhs;
  assign lhs    = harm_pow * best_fund_pow;
  assign rhs    = best_harm_pow * fund_pow;
  assign better = !have_best || (lhs < rhs);

  logic last_gen;
  assign last_gen  = (generation == GW'(GENERATIONS - 1));
  assign fit_start = (state == G_EVAL);
  assign lfsr_step = (state == G_WAIT) && fit_done && !last_gen;

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= G_START;
      have_best     <= 1'b0;
      search_done   <= 1'b0;
      improved      <= 1'b0;
      generation    <= '0;
      best_fund_pow <= '0;
      best_harm_pow <= '0;
      for (int k = 0; k < N_ANGLES; k++) begin
        winner[k]      <= '0;
        winner_gene[k] <= '0;
      end
    end else begin
      improved <= 1'b0;
      unique case (state)
        G_START: state <= G_EVAL;
        G_EVAL:  state <= G_WAIT;
        G_WAIT: if (fit_done) begin
          if (better) begin
            have_best     <= 1'b1;
            improved      <= 1'b1;
            winner        <= cand;
            winner_gene   <= sel;
            best_fund_pow <= fund_pow;
            best_harm_pow <= harm_pow;
          end
          generation <= generation + 1'b1;
          if (last_gen) begin
            search_done <= 1'b1;
            state       <= G_DONE;
          end else begin
            state <= G_EVAL;
          end
        end
        G_DONE: state <= G_DONE;
        default: state <= G_START;
      endcase
    end
  end

  she_pwm_gen #(.TICKS_PER_CYCLE(TICKS_PER_CYCLE)) u_pwm (
    .clk, .rst, .cycle_start, .pos, .angles_valid(search_done), .angle(winner),
    .gates, .level, .active(pwm_active)
  );

  // A new evaluation starts only when the fitness unit is idle.
  assert property (@(posedge clk) disable iff (rst) fit_start |-> !fit_busy);

  // Every chromosome drawn from the band is strictly increasing and below 90 degrees.
  assert property (@(posedge clk) disable iff (rst) fit_start |->
    (cand[0] < cand[1] && cand[1] < cand[2] && cand[2] < cand[3] && cand[3] < cand[4] &&
     cand[4] < cand[5] && cand[5] < cand[6] && cand[6] < 14'd9000));

  initial assert (GENERATIONS >= 1) else $error("ga_algorithms: GENERATIONS must be >= 1");
endmodule
