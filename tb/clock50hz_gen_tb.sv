// clock50hz_gen_tb: checks the fundamental-cycle divider at its default
// 50 MHz -> 50 Hz ratio: the tick is exactly 1,000,000 clocks apart and the
// square wave is high for exactly 500,000 clocks of each period. A second,
// small instance (divide by 10) checks the tick position after reset.
module clock50hz_gen_tb;
  logic clk = 0, rst = 1;
  always #10 clk = ~clk;   // 50 MHz

  logic tick, clk_out, tick_s, clk_out_s;
  clock50hz_gen dut (.clk, .rst, .cycle_tick(tick), .clk_out);
  clock50hz_gen #(.CLK_HZ(500), .FOUT_HZ(50)) dut_s (.clk, .rst, .cycle_tick(tick_s), .clk_out(clk_out_s));

  int checks = 0, failures = 0;
  longint cyc = 0, last_tick = -1, high = 0;
  int periods = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
  end

  // small instance: first tick is the 10th clock after reset release
  int small_cnt = 0, small_ticks = 0;
  always @(posedge clk) if (!rst) begin
    small_cnt++;
    if (tick_s) begin
      check(small_cnt % 10 == 0, $sformatf("small tick at clock %0d", small_cnt));
      small_ticks++;
    end
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (clk_out) high++;
    if (tick) begin
      if (last_tick >= 0) begin
        check(cyc - last_tick == 1_000_000, $sformatf("tick spacing %0d", cyc - last_tick));
        check(high == 500_000, $sformatf("high time %0d", high));
        periods++;
      end else begin
        check(cyc == 1_000_000, $sformatf("first tick at %0d", cyc));
      end
      last_tick = cyc;
      high = 0;
      if (periods == 2) begin
        check(small_ticks == 300_000, $sformatf("small ticks %0d", small_ticks));
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (3_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
