// ga_algorithms_tb: checks the genetic search and the gates it drives.
// The testbench plays the three LFSRs (reference model, stepped on
// lfsr_step) and the time base (one tick per clock, 20,000 ticks per cycle).
// It records the chromosome of every generation, evaluates its THD in
// floating point, and checks: GENERATIONS evaluations and LFSR steps
// (GENERATIONS-1 steps), one generation every NH*(7*(ITER+3)+1)+3 clocks,
// the winner is the chromosome of lowest reference THD (or within 0.1 % of
// it), the improved pulses match the reference running minimum, and after
// the next cycle start the gates follow the winner's staircase.
module ga_algorithms_tb;
  import she_pkg::*;
  import she_ref_pkg::*;

  localparam int GENERATIONS = 24;
  localparam int MAX_ORDER   = 39;
  localparam int ITER        = 18;
  localparam int TPC         = 20000;
  localparam int HALF        = TPC / 2;
  localparam int NH          = (MAX_ORDER + 1) / 2;
  localparam int GEN_CLOCKS  = NH * (7 * (ITER + 3) + 1) + 3;

  logic clk = 0, rst = 1;
  always #10 clk = ~clk;

  logic [6:0]  rnd_r, rnd_s, rnd_t;
  logic        lfsr_step, cycle_start, pwm_active, search_done, improved;
  logic [14:0] pos = '0;
  gates_t      gates;
  logic [2:0]  level;
  logic [4:0]  generation;
  angle_t      winner [7];
  gene_sel_t   winner_gene [7];
  logic [47:0] best_fund_pow, best_harm_pow;

  ga_algorithms #(.GENERATIONS(GENERATIONS), .MAX_ORDER(MAX_ORDER), .ITER(ITER),
                  .TICKS_PER_CYCLE(TPC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // LFSR models
  bit [6:0] qr = 7'h01, qs = 7'h2A, qt = 7'h5C;
  assign rnd_r = qr, rnd_s = qs, rnd_t = qt;
  always @(posedge clk) if (!rst && lfsr_step) begin
    qr <= lfsr_next(qr); qs <= lfsr_next(qs); qt <= lfsr_next(qt);
  end

  // time base
  assign cycle_start = (pos == 15'(TPC - 1));
  always @(posedge clk) if (!rst) pos <= (pos == 15'(TPC - 1)) ? '0 : pos + 1'b1;

  // reference search
  int    cand [GENERATIONS][7];
  real   thd2 [GENERATIONS];
  int    n_gen = 0, n_steps = 0, n_impr = 0, ref_impr = 0;
  real   ref_min = 1.0e9;
  longint cyc = 0, last_gen_cyc = -1;

  // Chromosome of generation n: the LFSR state after n steps.
  task automatic record(bit [6:0] r, bit [6:0] s, bit [6:0] t);
    for (int k = 0; k < 7; k++) cand[n_gen][k] = band_cdeg(k, gene_of(r, s, t, k));
    thd2[n_gen] = thd2_cdeg(cand[n_gen], MAX_ORDER);
    if (thd2[n_gen] < ref_min) begin ref_min = thd2[n_gen]; ref_impr++; end
    n_gen++;
  endtask

  logic [4:0] gen_prev = '0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (cyc == 1) record(qr, qs, qt);
    if (lfsr_step) begin
      n_steps++;
      if (n_gen < GENERATIONS) record(lfsr_next(qr), lfsr_next(qs), lfsr_next(qt));
    end
    if (improved) n_impr++;
    if (generation != gen_prev) begin
      if (last_gen_cyc >= 0)
        check(cyc - last_gen_cyc == longint'(GEN_CLOCKS), $sformatf("generation spacing %0d", cyc - last_gen_cyc));
      last_gen_cyc = cyc;
    end
    gen_prev <= generation;
  end

  initial begin
    int best_i;
    int tk [7];
    repeat (2) @(posedge clk);
    rst <= 0;
    wait (search_done);
    @(posedge clk); #1;
    check(n_gen == GENERATIONS, $sformatf("generations %0d", n_gen));
    check(n_steps == GENERATIONS - 1, $sformatf("LFSR steps %0d", n_steps));
    check(int'(generation) == GENERATIONS, "generation counter");
    check(n_impr == ref_impr, $sformatf("improvements %0d expected %0d", n_impr, ref_impr));
    best_i = -1;
    for (int g = 0; g < GENERATIONS; g++) begin
      bit same;
      same = 1;
      for (int k = 0; k < 7; k++) if (cand[g][k] != int'(winner[k])) same = 0;
      if (same) best_i = g;
    end
    check(best_i >= 0, "winner is one of the evaluated chromosomes");
    if (best_i >= 0)
      check(thd2[best_i] <= ref_min * 1.001, $sformatf("winner THD^2 %g, best %g", thd2[best_i], ref_min));
    for (int k = 0; k < 7; k++) begin
      int g;
      g = int'(winner_gene[k]);
      check(band_cdeg(k, g) == int'(winner[k]), "winner gene index");
    end
    check(!pwm_active && gates == '0, "gates off until the next cycle start");
    // wait for the cycle start, then follow one full cycle
    wait (cycle_start);
    @(posedge clk); #1;
    for (int k = 0; k < 7; k++) tk[k] = ticks_of(int'(winner[k]), TPC);
    for (int p = 0; p < TPC; p++) begin
      int q, l;
      @(posedge clk); #1;   // gates now show tick p
      q = (p >= HALF) ? p - HALF : p;
      l = 0;
      for (int k = 0; k < 7; k++) if (q >= tk[k] && q < HALF - tk[k]) l++;
      check(pwm_active && int'(level) == l && gates.s1 == l[0] && gates.s2 == l[1] && gates.s3 == l[2]
            && gates.h1 == (p < HALF) && gates.h2 == (p >= HALF),
            $sformatf("tick %0d level %0d expected %0d", p, level, l));
    end
    $display("winner THD (odd harmonics to %0d): %f %%", MAX_ORDER, 100.0 * $sqrt(ref_min));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (GENERATIONS * GEN_CLOCKS + 3 * TPC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
