// she_mli15_top_tb: end-to-end test of the complete scheme at the default
// parameters (50 MHz clock, 50 Hz output, 1 MHz time base, 127 generations,
// odd harmonics up to 39).
// After reset the GA search runs; the testbench models the three LFSRs from
// their seeds, evaluates every chromosome's THD in floating point and checks
// that the winner has the lowest THD. It then follows the inverter output
// for two full 50 Hz cycles, sampled at every 1 MHz tick:
//   - the load voltage equals the winner's staircase (Vdc = 10 V steps),
//   - all 15 levels -70 V .. +70 V occur, no shoot-through ever occurs,
//   - S1, S2, S3 change 14, 6, 2 times per half cycle, H1 once,
//   - the 50 Hz period is 1,000,000 clocks with 20,000 ticks in it,
//   - a DFT of the sampled output gives the analytic fundamental and a THD
//     (odd harmonics to 39) matching the GA's own fitness value, and a
//     THD over all resolved harmonics matching the analytic series.
// Each mechanism (LFSR step, improvement of the best, termination, hold-off
// of the gates during the search, polarity reversal of the H-bridge, cycle
// start) is counted and must occur.
module she_mli15_top_tb;
  import she_pkg::*;
  import she_ref_pkg::*;

  localparam int GENERATIONS = 127;
  localparam int MAX_ORDER   = 39;
  localparam int TPC         = 20000;
  localparam int HALF        = TPC / 2;
  localparam int CLK_PER_CYC = 1_000_000;

  logic clk_50mhz = 0, rst = 1;
  always #10 clk_50mhz = ~clk_50mhz;

  gates_t            gates;
  logic              clk_50hz, clk_1mhz, cycle_start, pwm_active, search_done, improved, lfsr_step;
  logic [14:0]       pos;
  logic [6:0]        generation;
  angle_t            winner [7];
  gene_sel_t         winner_gene [7];
  logic [47:0]       best_fund_pow, best_harm_pow;
  real               v_load, i_load;
  logic signed [3:0] level;
  logic              shoot_through;

  she_mli15_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- reference search -------------------------------------------------
  bit [6:0] qr = 7'h01, qs = 7'h2A, qt = 7'h5C;   // seeds of LFSR1..3
  int  cand [GENERATIONS][7];
  real thd2 [GENERATIONS];
  int  n_gen = 0, ref_impr = 0;
  real ref_min = 1.0e9;

  task automatic record();
    for (int k = 0; k < 7; k++) cand[n_gen][k] = band_cdeg(k, gene_of(qr, qs, qt, k));
    thd2[n_gen] = thd2_cdeg(cand[n_gen], MAX_ORDER);
    if (thd2[n_gen] < ref_min) begin ref_min = thd2[n_gen]; ref_impr++; end
    n_gen++;
  endtask

  // ---- mechanism counters -------------------------------------------------
  int n_steps = 0, n_impr = 0, n_done_rise = 0, n_holdoff = 0, n_polarity = 0, n_cycle = 0;
  int n_shoot = 0;
  bit done_d = 0;
  gates_t g_prev;
  longint cyc = 0, last_cycle = -1;

  always @(posedge clk_50mhz) if (!rst) begin
    cyc++;
    if (lfsr_step) begin
      n_steps++;
      qr = lfsr_next(qr); qs = lfsr_next(qs); qt = lfsr_next(qt);
      record();
    end
    if (improved) n_impr++;
    if (search_done && !done_d) n_done_rise++;
    done_d = search_done;
    if (!search_done && gates == '0) n_holdoff++;
    if (shoot_through) n_shoot++;
    if (g_prev.h1 != gates.h1 && pwm_active) n_polarity++;
    g_prev = gates;
    if (cycle_start) begin
      if (last_cycle >= 0)
        check(cyc - last_cycle == longint'(CLK_PER_CYC), $sformatf("50 Hz period %0d clocks", cyc - last_cycle));
      last_cycle = cyc;
      n_cycle++;
    end
  end

  // ---- output following --------------------------------------------------
  int  tk [7];
  int  seen [-7:7];
  real samp [TPC];

  function automatic int ref_level(int p);
    int q, l;
    q = (p >= HALF) ? p - HALF : p;
    l = 0;
    for (int k = 0; k < 7; k++) if (q >= tk[k] && q < HALF - tk[k]) l++;
    return (p >= HALF) ? -l : l;
  endfunction

  task automatic follow_cycle(bit store);
    int ts1, ts2, ts3, th1;
    gates_t gp;
    // called right after the edge that took cycle_start; the first gates of
    // the cycle appear two clocks later (pos, then the gate register)
    @(posedge clk_50mhz); #1;
    ts1 = 0; ts2 = 0; ts3 = 0; th1 = 0;
    gp = gates;
    for (int p = 0; p < TPC; p++) begin
      int l;
      @(posedge clk_50mhz); #1;                 // gates show tick p
      l = ref_level(p);
      check(int'(level) == l && v_load == 10.0 * l,
            $sformatf("tick %0d: level %0d (%f V) expected %0d", p, level, v_load, l));
      seen[l]++;
      if (store) samp[p] = v_load;
      if (p != 0 && p != HALF) begin
        ts1 += int'(gates.s1 != gp.s1);
        ts2 += int'(gates.s2 != gp.s2);
        ts3 += int'(gates.s3 != gp.s3);
      end
      th1 += int'(gates.h1 != gp.h1);
      gp = gates;
      if (p == HALF - 1 || p == TPC - 1) begin
        check(ts1 == 14 && ts2 == 6 && ts3 == 2,
              $sformatf("transitions per half cycle S1 %0d S2 %0d S3 %0d", ts1, ts2, ts3));
        ts1 = 0; ts2 = 0; ts3 = 0;
      end
      if (p != TPC - 1) repeat (49) @(posedge clk_50mhz);
    end
    check(th1 == 1 || th1 == 2, $sformatf("H1 changes %0d per cycle", th1));
  endtask

  initial begin
    int best_i;
    real v1_dft, harm_dft, ah, bh, v1_ref, thd_dft, thd_ga, sumcos, ms, thd_all, hs, c;
    repeat (3) @(posedge clk_50mhz);
    rst <= 0;
    record();                                   // generation 0: the seeds
    wait (search_done);
    @(posedge clk_50mhz); #1;
    check(n_gen == GENERATIONS && int'(generation) == GENERATIONS,
          $sformatf("generations %0d / %0d", n_gen, generation));
    check(n_impr == ref_impr, $sformatf("improvements %0d expected %0d", n_impr, ref_impr));
    best_i = -1;
    for (int g = 0; g < GENERATIONS; g++) begin
      bit same;
      same = 1;
      for (int k = 0; k < 7; k++) if (cand[g][k] != int'(winner[k])) same = 0;
      if (same) best_i = g;
    end
    check(best_i >= 0, "winner is an evaluated chromosome");
    if (best_i >= 0)
      check(thd2[best_i] <= ref_min * 1.001, $sformatf("winner THD^2 %g, best %g", thd2[best_i], ref_min));
    $display("search done after %0d clocks (%0.3f ms); winner (deg):", cyc, cyc * 20e-6);
    for (int k = 0; k < 7; k++) $display("  theta%0d = %0.2f (G%0d)", k + 1, winner[k] / 100.0, winner_gene[k] + 1);
    for (int k = 0; k < 7; k++) tk[k] = ticks_of(int'(winner[k]), TPC);

    // two full output cycles
    wait (cycle_start); @(posedge clk_50mhz); #1;
    follow_cycle(1);
    wait (cycle_start); @(posedge clk_50mhz); #1;
    follow_cycle(0);

    // levels and mechanisms
    for (int l = -7; l <= 7; l++) check(seen[l] > 0, $sformatf("level %0d never seen", l));
    check(n_steps == GENERATIONS - 1, $sformatf("LFSR steps %0d", n_steps));
    check(n_impr > 0,      "the best chromosome was never improved");
    check(n_done_rise == 1, "search termination");
    check(n_holdoff > 0,   "gates held off during the search");
    check(n_polarity >= 4, $sformatf("H-bridge polarity reversals %0d", n_polarity));
    check(n_cycle >= 2,    "cycle starts");
    check(n_shoot == 0,    "shoot-through");

    sumcos = 0.0;
    for (int k = 0; k < 7; k++) sumcos += $cos(winner[k] / 100.0 * PI / 180.0);
    v1_ref  = 4.0 * 10.0 / PI * sumcos;
    // DFT of one sampled cycle
    v1_dft = 0.0; harm_dft = 0.0;
    for (int h = 1; h <= MAX_ORDER; h += 2) begin
      ah = 0.0; bh = 0.0;
      for (int p = 0; p < TPC; p++) begin
        ah += samp[p] * $cos(2.0 * PI * h * (p + 0.5) / TPC);
        bh += samp[p] * $sin(2.0 * PI * h * (p + 0.5) / TPC);
      end
      ah = 2.0 * ah / TPC; bh = 2.0 * bh / TPC;
      if (h == 1) v1_dft = $sqrt(ah * ah + bh * bh);
      else        harm_dft += ah * ah + bh * bh;
    end
    thd_dft = $sqrt(harm_dft) / v1_dft;
    // THD over every harmonic the sampling resolves, from the RMS value,
    // against the analytic series summed to harmonic 5000
    ms = 0.0;
    for (int p = 0; p < TPC; p++) ms += samp[p] * samp[p];
    ms = ms / TPC;
    thd_all = $sqrt(ms - v1_dft * v1_dft / 2.0) / (v1_dft / $sqrt(2.0));
    hs = 0.0;
    for (int h = 3; h <= 5000; h += 2) begin
      c = 0.0;
      for (int k = 0; k < 7; k++) c += $cos(h * winner[k] / 100.0 * PI / 180.0);
      hs += (c / h) * (c / h);
    end
    $display("THD over all harmonics: output %0.2f %%, analytic %0.2f %%", 100.0 * thd_all,
             100.0 * $sqrt(hs) / sumcos);
    check(thd_all > 0.95 * $sqrt(hs) / sumcos && thd_all < 1.05 * $sqrt(hs) / sumcos, "total THD");
    thd_ga  = $sqrt(real'(best_harm_pow) / real'(best_fund_pow));
    $display("fundamental %0.2f V peak (analytic %0.2f V); THD to h=%0d: output %0.2f %%, GA fitness %0.2f %%",
             v1_dft, v1_ref, MAX_ORDER, 100.0 * thd_dft, 100.0 * thd_ga);
    check(v1_dft > 0.995 * v1_ref && v1_dft < 1.005 * v1_ref, "fundamental amplitude");
    check(thd_dft > 0.97 * thd_ga && thd_dft < 1.03 * thd_ga, "THD of the output matches the GA fitness");
    $display("mechanisms: lfsr_steps=%0d improvements=%0d terminations=%0d holdoff_clocks=%0d polarity_reversals=%0d cycle_starts=%0d",
             n_steps, n_impr, n_done_rise, n_holdoff, n_polarity, n_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (GENERATIONS * 3000 + 4 * CLK_PER_CYC) @(posedge clk_50mhz);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
