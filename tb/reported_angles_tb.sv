// reported_angles_tb: runs the published final switching angles
// (3.9, 12.0, 20.2, 29.0, 38.5, 49.6, 64.2 degrees) through the gate
// generator and the inverter model for one 50 Hz cycle at the default
// 20,000 ticks per cycle, and measures the output:
//   - fundamental amplitude by DFT, against 4*Vdc/pi * sum cos(theta_k)
//     = 72.0 V (the published spectrum shows 70.85 V from a circuit
//     simulation; within 3 % is accepted),
//   - THD over odd harmonics up to 39 by DFT, against the analytic 3.31 %,
//   - THD over every harmonic the sampling resolves (from the RMS value),
//     against the analytic series summed to harmonic 5000, 5.30 %
//     (published: 5.65 %, reported for information),
//   - the THD fitness unit's rating of the same set against the DFT value.
module reported_angles_tb;
  import she_pkg::*;
  import she_ref_pkg::*;

  localparam int TPC = 20000;
  localparam int THETA_CDEG [7] = '{390, 1200, 2020, 2900, 3850, 4960, 6420};

  logic clk = 0, rst = 1, start = 0;
  always #10 clk = ~clk;

  logic [14:0]       pos = '0;
  logic              cycle_start, active, fdone, fbusy;
  angle_t            angle [7];
  gates_t            gates;
  logic [2:0]        level;
  real               v_load, i_load;
  logic signed [3:0] slevel;
  logic              shoot_through;
  logic [47:0]       fund_pow, harm_pow;

  she_pwm_gen #(.TICKS_PER_CYCLE(TPC)) u_pwm (
    .clk, .rst, .cycle_start, .pos, .angles_valid(1'b1), .angle, .gates, .level, .active);
  mli15_inverter u_inv (.gates, .v_load, .i_load, .level(slevel), .shoot_through);
  thd_fitness u_fit (.clk, .rst, .start, .angle, .busy(fbusy), .done(fdone), .fund_pow, .harm_pow);

  assign cycle_start = (pos == 15'(TPC - 1));
  always @(posedge clk) if (!rst) pos <= (pos == 15'(TPC - 1)) ? '0 : pos + 1'b1;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real samp [TPC];

  function automatic bit near_rel(real x, real ref_v, real rel);
    return x >= ref_v * (1.0 - rel) && x <= ref_v * (1.0 + rel);
  endfunction

  initial begin
    real ah, bh, v1, harm39, ms, v1_ref, harm_ref, thd39, thd_all, thd_all_ref, thd_fit, c;
    for (int k = 0; k < 7; k++) angle[k] = angle_t'(THETA_CDEG[k]);
    repeat (2) @(posedge clk);
    rst <= 0;
    // fitness unit on the same set
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    wait (fdone);
    @(posedge clk); #1;
    thd_fit = $sqrt(real'(harm_pow) / real'(fund_pow));
    // first cycle start latches the angles; sample the following cycle
    wait (cycle_start);
    @(posedge clk); #1;
    @(posedge clk); #1;
    for (int p = 0; p < TPC; p++) begin
      @(posedge clk); #1;
      samp[p] = v_load;
      check(!shoot_through, "no shoot-through");
    end
    // DFT
    v1 = 0.0; harm39 = 0.0; ms = 0.0;
    for (int p = 0; p < TPC; p++) ms += samp[p] * samp[p];
    ms = ms / TPC;
    for (int h = 1; h <= 39; h += 2) begin
      ah = 0.0; bh = 0.0;
      for (int p = 0; p < TPC; p++) begin
        ah += samp[p] * $cos(2.0 * PI * h * (p + 0.5) / TPC);
        bh += samp[p] * $sin(2.0 * PI * h * (p + 0.5) / TPC);
      end
      ah = 2.0 * ah / TPC; bh = 2.0 * bh / TPC;
      if (h == 1) v1 = $sqrt(ah * ah + bh * bh); else harm39 += ah * ah + bh * bh;
    end
    thd39   = $sqrt(harm39) / v1;
    thd_all = $sqrt(ms - v1 * v1 / 2.0) / (v1 / $sqrt(2.0));
    // analytic references
    v1_ref = 0.0;
    for (int k = 0; k < 7; k++) v1_ref += $cos(THETA_CDEG[k] / 100.0 * PI / 180.0);
    v1_ref = 4.0 * 10.0 / PI * v1_ref;
    harm_ref = 0.0;
    for (int h = 3; h <= 5000; h += 2) begin
      c = 0.0;
      for (int k = 0; k < 7; k++) c += $cos(h * THETA_CDEG[k] / 100.0 * PI / 180.0);
      c = 4.0 * 10.0 / (PI * h) * c;
      harm_ref += c * c;
    end
    thd_all_ref = $sqrt(harm_ref) / v1_ref;
    $display("fundamental %0.2f V (analytic %0.2f V, published 70.85 V)", v1, v1_ref);
    $display("THD to h=39: %0.2f %% (analytic %0.2f %%, fitness unit %0.2f %%)",
             100.0 * thd39, 100.0 * $sqrt(thd2_cdeg(THETA_CDEG, 39)), 100.0 * thd_fit);
    $display("THD, all harmonics: %0.2f %% (analytic to h=5000 %0.2f %%, published 5.65 %%)",
             100.0 * thd_all, 100.0 * thd_all_ref);
    check(near_rel(v1, v1_ref, 0.002), "fundamental against analytic value");
    check(near_rel(v1, 70.85, 0.03), "fundamental within 3 % of the published 70.85 V");
    check(near_rel(thd39, $sqrt(thd2_cdeg(THETA_CDEG, 39)), 0.03), "THD to h=39 against analytic");
    check(near_rel(thd_fit, thd39, 0.03), "fitness unit against measured THD");
    check(near_rel(thd_all, thd_all_ref, 0.05), "total THD against analytic series");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * TPC + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
