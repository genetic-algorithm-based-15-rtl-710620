// mli15_inverter_tb: checks the inverter model against the 15-level
// switching table (rows 1..15: S1 S2 S3 H1 H2 H3 H4 -> output in Vdc, with
// Vdc = 10 V), then sweeps all 128 gate combinations for the polarity rule
// and the shoot-through flag.
module mli15_inverter_tb;
  import she_pkg::*;

  gates_t            gates;
  real               v_load, i_load;
  logic signed [3:0] level;
  logic              shoot_through;

  mli15_inverter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Switching table: {S1,S2,S3,H1,H2,H3,H4}, expected volts.
  localparam logic [6:0] ROW_GATES [15] = '{
    7'b1001010, 7'b0101010, 7'b1101010, 7'b0011010, 7'b1011010, 7'b0111010, 7'b1111010,
    7'b0001010,
    7'b1000101, 7'b0100101, 7'b1100101, 7'b0010101, 7'b1010101, 7'b0110101, 7'b1110101
  };
  localparam real ROW_VOLTS [15] = '{10.0, 20.0, 30.0, 40.0, 50.0, 60.0, 70.0, 0.0,
                                     -10.0, -20.0, -30.0, -40.0, -50.0, -60.0, -70.0};

  initial begin
    for (int r = 0; r < 15; r++) begin
      {gates.s1, gates.s2, gates.s3, gates.h1, gates.h2, gates.h3, gates.h4} = ROW_GATES[r];
      #1;
      check(v_load == ROW_VOLTS[r], $sformatf("row %0d: %f V expected %f V", r + 1, v_load, ROW_VOLTS[r]));
      check(i_load == ROW_VOLTS[r] / 100.0, $sformatf("row %0d current", r + 1));
      check(!shoot_through, "no shoot-through in table rows");
    end
    for (int c = 0; c < 128; c++) begin
      int m, l;
      bit st;
      {gates.s1, gates.s2, gates.s3, gates.h1, gates.h2, gates.h3, gates.h4} = 7'(c);
      #1;
      m  = gates.s1 + 2 * gates.s2 + 4 * gates.s3;
      st = (gates.h1 && gates.h4) || (gates.h2 && gates.h3);
      if (gates.h1 && gates.h3 && !gates.h2 && !gates.h4)      l = m;
      else if (gates.h2 && gates.h4 && !gates.h1 && !gates.h3) l = -m;
      else                                                     l = 0;
      check(int'(level) == l, $sformatf("gates %b level %0d expected %0d", 7'(c), level, l));
      check(shoot_through == st, $sformatf("gates %b shoot-through", 7'(c)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
