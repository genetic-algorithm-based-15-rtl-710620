// she_ref_pkg: independent reference models for the testbenches.
//
// Holds a copy of the switching-angle band in degrees (as published), a
// bit-level model of the 7-stage LFSR, the gene selection rule and a
// floating-point THD of a quarter-wave staircase:
//     V_h = (1/h) * sum_k cos(h * theta_k),  THD^2 = sum_{h=3,5..N} V_h^2 / V_1^2
// None of it shares code with the RTL.
package she_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // Band of switching angles in degrees: row = theta1..theta7, column = G1..G8.
  localparam real BAND_DEG [7][8] = '{
    '{10.49, 11.00, 11.70, 12.01, 12.06, 12.24, 12.49, 13.00},
    '{17.50, 17.73, 18.00, 18.27, 18.50, 18.63, 18.81, 19.01},
    '{24.75, 24.84, 24.93, 25.11, 25.29, 25.51, 26.37, 26.50},
    '{42.50, 42.66, 42.84, 43.00, 43.11, 43.20, 44.10, 44.50},
    '{49.86, 50.00, 50.22, 50.85, 50.99, 51.12, 54.50, 54.63},
    '{67.32, 67.50, 68.51, 68.99, 69.12, 69.21, 69.39, 69.57},
    '{75.42, 75.49, 75.89, 76.00, 76.68, 77.00, 81.72, 82.01}
  };

  // Band entry in centidegrees.
  function automatic int band_cdeg(int k, int g);
    return $rtoi(BAND_DEG[k][g] * 100.0 + 0.5);
  endfunction

  // One step of the x^7 + x^6 + 1 LFSR; stage Rn is bit n-1, feedback into R1.
  function automatic bit [6:0] lfsr_next(bit [6:0] q);
    bit fb;
    fb = q[5] ^ q[6];
    return {q[5:0], fb};
  endfunction

  // Gene chosen for angle k from the three LFSR states: {R_k, S_k, T_k}.
  function automatic int gene_of(bit [6:0] r, bit [6:0] s, bit [6:0] t, int k);
    return 4 * r[k] + 2 * s[k] + t[k];
  endfunction

  // THD^2 of a staircase with switching angles a[] in centidegrees.
  function automatic real thd2_cdeg(int a [7], int max_order);
    real v1, harm, c;
    v1 = 0.0; harm = 0.0;
    for (int h = 1; h <= max_order; h += 2) begin
      c = 0.0;
      for (int k = 0; k < 7; k++) c += $cos(h * a[k] / 100.0 * PI / 180.0);
      c = c / h;
      if (h == 1) v1 = c; else harm += c * c;
    end
    return harm / (v1 * v1);
  endfunction

  // Switching instant of an angle in time-base ticks.
  function automatic int ticks_of(int cdeg, int ticks_per_cycle);
    return $rtoi($floor(real'(cdeg) * ticks_per_cycle / 36000.0 + 0.5));
  endfunction

endpackage
