// she_pwm_gen_tb: checks the SHE PWM gate generator at its default 20,000
// ticks per cycle. The time base is driven directly, one tick per clock.
// Cycle 0 runs with angles_valid low (all switches must stay off); cycles
// 1..4 each use a different random chromosome from the band, changed in mid
// cycle to show that angles are taken only at the cycle start. Every clock
// the registered gates are compared with a reference level computed from
// the angles in degrees, and per half cycle S1, S2, S3 must change state
// 14, 6 and 2 times and the H switches once per half cycle.
module she_pwm_gen_tb;
  import she_pkg::*;
  import she_ref_pkg::*;

  localparam int TPC  = 20000;
  localparam int HALF = TPC / 2;

  logic clk = 0, rst = 1, cycle_start, angles_valid = 0;
  always #10 clk = ~clk;
  logic [14:0] pos = '0;
  angle_t      angle [7];
  gates_t      gates;
  logic [2:0]  level;
  logic        active;

  she_pwm_gen #(.TICKS_PER_CYCLE(TPC)) dut (.*);

  assign cycle_start = (pos == 15'(TPC - 1));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int   cur [7];       // angles (centidegrees) in force this cycle
  int   nxt [7];       // angles presented on the input
  int   tk  [7];
  int   cycle = 0;
  bit   valid_now = 0;
  logic [14:0] pos_d;
  gates_t prev;
  int   tr_s1, tr_s2, tr_s3, tr_h1, tr_h2;

  function automatic int ref_level(int p);
    int q, l;
    q = (p >= HALF) ? p - HALF : p;
    l = 0;
    for (int k = 0; k < 7; k++) if (q >= tk[k] && q < HALF - tk[k]) l++;
    return l;
  endfunction

  task automatic new_angles();
    for (int k = 0; k < 7; k++) begin
      nxt[k]   = band_cdeg(k, $urandom_range(7));
      angle[k] = angle_t'(nxt[k]);
    end
  endtask

  initial begin
    new_angles();
    repeat (2) @(posedge clk);
    rst <= 0;
  end

  always @(posedge clk) if (!rst) begin
    pos_d <= pos;
    pos   <= (pos == 15'(TPC - 1)) ? '0 : pos + 1'b1;
  end

  // Bookkeeping happens after the registered outputs have settled.
  always @(posedge clk) if (!rst) begin
    #1;
    // outputs now reflect pos_d with the angles in force for pos_d's cycle
    if (!valid_now) begin
      check(gates == '0 && (!active || pos_d == 15'(TPC - 1)), $sformatf("gates off before valid angles, pos %0d", pos_d));
    end else begin
      int l;
      bit neg;
      l   = ref_level(int'(pos_d));
      neg = (int'(pos_d) >= HALF);
      check(int'(level) == l, $sformatf("cycle %0d pos %0d level %0d expected %0d", cycle, pos_d, level, l));
      check(gates.s1 == l[0] && gates.s2 == l[1] && gates.s3 == l[2], "S gates");
      check(gates.h1 == !neg && gates.h3 == !neg && gates.h2 == neg && gates.h4 == neg, "H gates");
      if (pos_d != 0) begin
        tr_s1 += int'(gates.s1 != prev.s1);
        tr_s2 += int'(gates.s2 != prev.s2);
        tr_s3 += int'(gates.s3 != prev.s3);
        tr_h1 += int'(gates.h1 != prev.h1);
        tr_h2 += int'(gates.h2 != prev.h2);
      end
      if (pos_d == 15'(HALF - 1) || pos_d == 15'(TPC - 1)) begin
        // one half cycle done (the H change at the half boundary belongs to the next)
        check(tr_s1 == 14, $sformatf("S1 transitions %0d", tr_s1));
        check(tr_s2 == 6,  $sformatf("S2 transitions %0d", tr_s2));
        check(tr_s3 == 2,  $sformatf("S3 transitions %0d", tr_s3));
        check(tr_h1 == (pos_d == 15'(HALF - 1) ? 0 : 1), $sformatf("H1 transitions %0d", tr_h1));
        check(tr_h2 == tr_h1, "H2 transitions");
        tr_s1 = 0; tr_s2 = 0; tr_s3 = 0; tr_h1 = 0; tr_h2 = 0;
      end
    end
    prev = gates;
    if (pos_d == 15'(TPC - 1)) begin
      // the cycle_start sampled at this edge latched the inputs
      valid_now = angles_valid;
      cur = nxt;
      for (int k = 0; k < 7; k++) tk[k] = ticks_of(cur[k], TPC);
      cycle++;
      tr_s1 = 0; tr_s2 = 0; tr_s3 = 0; tr_h1 = 0; tr_h2 = 0;
      if (cycle == 1) angles_valid = 1;
      if (cycle == 5) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    if (pos_d == 15'(TPC / 3)) new_angles();   // mid-cycle change, used from the next cycle
  end

  initial begin
    repeat (6 * TPC + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
