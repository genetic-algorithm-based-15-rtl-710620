// level15_tb: checks the FPGA controller with a reduced clock (5 MHz, so
// 5 clocks per 1 MHz tick and 100,000 clocks per 50 Hz cycle), 6
// generations and harmonics up to 15. It checks the divided clocks and the
// tick index, that the three LFSRs (seeds 01, 2A, 5C hex) step once per
// generation, that the winner is the lowest-THD chromosome among those the
// LFSR sequence selects, and that the gates follow the winner's staircase
// over one full cycle.
module level15_tb;
  import she_pkg::*;
  import she_ref_pkg::*;

  localparam int CLK_HZ      = 5_000_000;
  localparam int GENERATIONS = 6;
  localparam int MAX_ORDER   = 15;
  localparam int TPC         = 20000;
  localparam int HALF        = TPC / 2;
  localparam int DIV1M       = 5;

  logic clk_50mhz = 0, rst = 1;
  always #100 clk_50mhz = ~clk_50mhz;

  gates_t      gates;
  logic [2:0]  level;
  logic        clk_50hz, clk_1mhz, cycle_start, pwm_active, search_done, improved, lfsr_step;
  logic [14:0] pos;
  logic [2:0]  generation;
  angle_t      winner [7];
  gene_sel_t   winner_gene [7];
  logic [47:0] best_fund_pow, best_harm_pow;

  level15 #(.CLK_HZ(CLK_HZ), .GENERATIONS(GENERATIONS), .MAX_ORDER(MAX_ORDER)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit [6:0] qr = 7'h01, qs = 7'h2A, qt = 7'h5C;
  int  cand [GENERATIONS][7];
  real thd2 [GENERATIONS];
  int  n_gen = 0, n_steps = 0;
  real ref_min = 1.0e9;
  longint cyc = 0, last_cs = -1;
  int  hi_1m = 0, n_cs = 0;

  task automatic record();
    for (int k = 0; k < 7; k++) cand[n_gen][k] = band_cdeg(k, gene_of(qr, qs, qt, k));
    thd2[n_gen] = thd2_cdeg(cand[n_gen], MAX_ORDER);
    if (thd2[n_gen] < ref_min) ref_min = thd2[n_gen];
    n_gen++;
  endtask

  always @(posedge clk_50mhz) if (!rst) begin
    cyc++;
    if (lfsr_step) begin
      n_steps++;
      qr = lfsr_next(qr); qs = lfsr_next(qs); qt = lfsr_next(qt);
      record();
    end
    if (clk_1mhz) hi_1m++;
    if (cycle_start) begin
      if (last_cs >= 0) begin
        check(cyc - last_cs == 100_000, $sformatf("cycle period %0d", cyc - last_cs));
        check(hi_1m == (DIV1M / 2) * TPC, $sformatf("1 MHz clock high %0d of 100000", hi_1m));
      end
      last_cs = cyc;
      hi_1m = 0;
      n_cs++;
    end
  end

  initial begin
    int tk [7];
    int best_i;
    repeat (3) @(posedge clk_50mhz);
    rst <= 0;
    record();
    wait (search_done);
    @(posedge clk_50mhz); #1;
    check(n_gen == GENERATIONS && n_steps == GENERATIONS - 1, "generations and LFSR steps");
    best_i = -1;
    for (int g = 0; g < GENERATIONS; g++) begin
      bit same;
      same = 1;
      for (int k = 0; k < 7; k++) if (cand[g][k] != int'(winner[k])) same = 0;
      if (same) best_i = g;
    end
    check(best_i >= 0 && thd2[best_i] <= ref_min * 1.001, "winner has the lowest THD");
    for (int k = 0; k < 7; k++) tk[k] = ticks_of(int'(winner[k]), TPC);
    wait (cycle_start);
    @(posedge clk_50mhz); #1;
    check(pos == 0, "pos restarts at the cycle start");
    @(posedge clk_50mhz); #1;
    for (int p = 0; p < TPC; p++) begin
      int q, l;
      @(posedge clk_50mhz); #1;
      check(int'(pos) == p || (p == 0), $sformatf("pos %0d expected %0d", pos, p));
      q = (p >= HALF) ? p - HALF : p;
      l = 0;
      for (int k = 0; k < 7; k++) if (q >= tk[k] && q < HALF - tk[k]) l++;
      check(pwm_active && int'(level) == l && gates.s1 == l[0] && gates.s2 == l[1] && gates.s3 == l[2]
            && gates.h1 == (p < HALF) && gates.h3 == (p < HALF) && gates.h2 == (p >= HALF) && gates.h4 == (p >= HALF),
            $sformatf("tick %0d level %0d expected %0d", p, level, l));
      if (p != TPC - 1) repeat (DIV1M - 1) @(posedge clk_50mhz);
    end
    wait (cycle_start);
    @(posedge clk_50mhz); #1;
    check(n_cs >= 2, "cycle starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (GENERATIONS * 800 + 3 * 100_000 + 1000) @(posedge clk_50mhz);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
