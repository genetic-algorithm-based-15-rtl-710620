// clock1mhz_gen_tb: checks the 1 MHz time base at the default 50 MHz clock:
// a tick every 50 clocks, a 25-clock-high square wave, pos counting 0..19999
// once per 20,000 ticks (one 50 Hz cycle), and a restart of both the divider
// and pos on sync.
module clock1mhz_gen_tb;
  logic clk = 0, rst = 1, sync = 0;
  always #10 clk = ~clk;

  logic tick, clk_out;
  logic [14:0] pos;
  clock1mhz_gen dut (.clk, .rst, .sync, .tick, .clk_out, .pos);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc, ntick, hi, wraps;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    cyc = 0; ntick = 0; hi = 0; wraps = 0;
    // one full cycle of 20,000 ticks = 1,000,000 clocks
    while (cyc < 1_000_000) begin
      @(posedge clk);
      cyc++;
      if (clk_out) hi++;
      #1;
      if (tick) begin
        ntick++;
        check(cyc % 50 == 49, $sformatf("tick at clock %0d", cyc));
      end
      if (cyc % 50 == 1 && cyc > 50)
        check(pos == 15'((cyc / 50) % 20000), $sformatf("pos %0d at clock %0d", pos, cyc));
    end
    check(ntick == 20000, $sformatf("ticks per cycle %0d", ntick));
    check(hi == 500_000, $sformatf("square wave high %0d", hi));
    @(posedge clk); #1;
    check(pos == 0, $sformatf("pos wraps to 0, got %0d", pos));
    // let it run, then sync in the middle of a divider period
    repeat (1037) @(posedge clk);
    check(pos != 0, "pos advanced before sync");
    sync <= 1;
    @(posedge clk);
    sync <= 0;
    #1;
    check(pos == 0, "pos cleared by sync");
    repeat (49) @(posedge clk);
    #1;
    check(tick == 1, "tick 50 clocks after sync");
    @(posedge clk); #1;
    check(pos == 1, "pos 1 after first tick following sync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
