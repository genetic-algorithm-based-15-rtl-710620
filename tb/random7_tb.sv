// random7_tb: checks the 7-stage LFSR against a bit-level reference model:
// reset loads the seed, every step matches x^7 + x^6 + 1 with feedback into
// R1, the sequence has the maximal period 127 with all non-zero states, and
// step low holds the state.
module random7_tb;
  import she_ref_pkg::*;
  logic clk = 0, rst = 1, step = 0;
  always #10 clk = ~clk;

  logic [6:0] q;
  random7 #(.SEED(7'h2A)) dut (.clk, .rst, .step, .q);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit [6:0] ref_q;
  bit seen [128];
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    check(q == 7'h2A, "seed after reset");
    ref_q = 7'h2A;
    seen[ref_q] = 1;
    for (int n = 1; n <= 127; n++) begin
      step <= 1;
      @(posedge clk); #1;
      ref_q = lfsr_next(ref_q);
      check(q == ref_q, $sformatf("step %0d: got %h expected %h", n, q, ref_q));
      if (n < 127) begin
        check(!seen[ref_q], $sformatf("state %h repeats early", ref_q));
        seen[ref_q] = 1;
      end else check(ref_q == 7'h2A, "period 127");
      // hold with step low on some steps
      if (n % 5 == 0) begin
        step <= 0;
        repeat (3) @(posedge clk);
        #1;
        check(q == ref_q, "hold with step low");
      end
    end
    step <= 0;
    rst <= 1;
    @(posedge clk); #1;
    check(q == 7'h2A, "reset reloads seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
