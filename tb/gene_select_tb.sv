// gene_select_tb: checks the band memory and the seven 8x1 multiplexers.
// Every gene of every angle is selected directly, then random LFSR states
// are applied; the selects and angles are compared with the published band
// and the {R_k, S_k, T_k} select rule, and each chromosome is checked to be
// strictly increasing and below 90 degrees.
module gene_select_tb;
  import she_pkg::*;
  import she_ref_pkg::*;

  logic [6:0] r, s, t;
  gene_sel_t  sel [7];
  angle_t     angle [7];
  gene_select dut (.r, .s, .t, .sel, .angle);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare();
    for (int k = 0; k < 7; k++) begin
      int g;
      g = gene_of(r, s, t, k);
      check(int'(sel[k]) == g, $sformatf("sel[%0d]=%0d expected %0d", k, sel[k], g));
      check(int'(angle[k]) == band_cdeg(k, g),
            $sformatf("angle[%0d]=%0d expected %0d", k, angle[k], band_cdeg(k, g)));
      if (k > 0) check(angle[k] > angle[k-1], "increasing");
    end
    check(angle[6] < 9000, "below 90 degrees");
  endtask

  initial begin
    for (int g = 0; g < 8; g++) begin
      r = {7{g[2]}}; s = {7{g[1]}}; t = {7{g[0]}};
      #1 compare();
    end
    for (int n = 0; n < 200; n++) begin
      r = 7'($urandom); s = 7'($urandom); t = 7'($urandom);
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
