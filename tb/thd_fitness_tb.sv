// thd_fitness_tb: checks the THD fitness unit against a floating-point
// evaluation of the harmonic equations. Chromosomes: the eight "all genes
// equal" sets of the band, 40 random band chromosomes and one set outside
// the band (3.9, 12, 20.2, 29, 38.5, 49.6, 64.2 degrees). For each, the
// fundamental power must match to 0.1 % and the harmonic power to
// 1e-3 + 0.2 %; the THD ordering of consecutive chromosomes must agree with
// the reference when the two differ by more than 1 %. The latency from
// start to done must be NH * (7 * (ITER + 3) + 1) + 2 clocks (the testbench
// counts one edge more: it reads done before the edge that set it settles).
module thd_fitness_tb;
  import she_pkg::*;
  import she_ref_pkg::*;

  localparam int MAX_ORDER = 39;
  localparam int ITER      = 18;
  localparam int NH        = (MAX_ORDER + 1) / 2;
  localparam int LATENCY   = NH * (7 * (ITER + 3) + 1) + 3;  // edges from the one sampling start

  logic clk = 0, rst = 1, start = 0;
  always #10 clk = ~clk;
  angle_t      angle [7];
  logic        busy, done;
  logic [47:0] fund_pow, harm_pow;

  thd_fitness #(.MAX_ORDER(MAX_ORDER), .ITER(ITER)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real prev_thd2_ref, prev_thd2_dut;
  bit  have_prev = 0;

  task automatic run_one(int a [7]);
    real v1, harm, c, fund_r, harm_r, d_fund, d_harm, thd2_d, thd2_r;
    int  lat;
    for (int k = 0; k < 7; k++) angle[k] = angle_t'(a[k]);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    #1 for (int k = 0; k < 7; k++) angle[k] = '0;   // inputs are latched
    lat = 1;
    while (!done) begin @(posedge clk); lat++; end
    check(lat == LATENCY, $sformatf("latency %0d expected %0d", lat, LATENCY));
    // reference
    v1 = 0.0; harm = 0.0;
    for (int h = 1; h <= MAX_ORDER; h += 2) begin
      c = 0.0;
      for (int k = 0; k < 7; k++) c += $cos(h * a[k] / 100.0 * PI / 180.0);
      c = c / h;
      if (h == 1) v1 = c * c; else harm += c * c;
    end
    fund_r = real'(fund_pow) / 1073741824.0;
    harm_r = real'(harm_pow) / 1073741824.0;
    d_fund = fund_r - v1;  if (d_fund < 0) d_fund = -d_fund;
    d_harm = harm_r - harm; if (d_harm < 0) d_harm = -d_harm;
    check(d_fund <= 1e-3 * v1, $sformatf("fund %f expected %f", fund_r, v1));
    check(d_harm <= 1e-3 + 2e-3 * harm, $sformatf("harm %f expected %f", harm_r, harm));
    thd2_d = harm_r / fund_r;
    thd2_r = thd2_cdeg(a, MAX_ORDER);
    if (have_prev) begin
      real rel;
      rel = (thd2_r - prev_thd2_ref) / prev_thd2_ref;
      if (rel > 0.01 || rel < -0.01)
        check((thd2_r < prev_thd2_ref) == (thd2_d < prev_thd2_dut), "THD ordering");
    end
    prev_thd2_ref = thd2_r; prev_thd2_dut = thd2_d; have_prev = 1;
  endtask

  initial begin
    int a [7];
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int g = 0; g < 8; g++) begin
      for (int k = 0; k < 7; k++) a[k] = band_cdeg(k, g);
      run_one(a);
    end
    for (int n = 0; n < 40; n++) begin
      for (int k = 0; k < 7; k++) a[k] = band_cdeg(k, $urandom_range(7));
      run_one(a);
    end
    a = '{390, 1200, 2020, 2900, 3850, 4960, 6420};
    run_one(a);
    $display("THD of the last set up to harmonic %0d: %f %%", MAX_ORDER,
             100.0 * $sqrt(real'(harm_pow) / real'(fund_pow)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * LATENCY) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
