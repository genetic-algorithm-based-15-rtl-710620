// she_pkg: types and constants shared by the GA-based SHE PWM controller for
// a 15-level asymmetric multilevel inverter.
//
// Switching angles are carried as unsigned integers in hundredths of a degree
// (centidegrees), the resolution to which the angle band is tabulated. The
// band table below holds, for each of the seven quarter-wave switching angles
// theta1..theta7, the eight candidate values G1..G8 that an offline solution
// of the selective-harmonic-elimination equations produced. Those numbers are
// the published band; the centidegree encoding is this design's choice.
package she_pkg;

  localparam int unsigned N_ANGLES = 7;   // switching angles per quarter wave
  localparam int unsigned N_GENES  = 8;   // candidate values per angle (8x1 mux)
  localparam int unsigned ANGLE_W  = 14;  // 0..9000 centidegrees fits in 14 bits
  localparam int unsigned FULL_TURN_CDEG = 36000;

  typedef logic [ANGLE_W-1:0] angle_t;          // centidegrees
  typedef angle_t angle_set_t [N_ANGLES];       // one chromosome: theta1..theta7
  typedef logic [2:0] gene_sel_t;               // select of one 8x1 mux

  // Band of switching angles, centidegrees, [angle][gene] = theta(angle+1), G(gene+1).
  localparam angle_t BAND [N_ANGLES][N_GENES] = '{
    '{14'd1049, 14'd1100, 14'd1170, 14'd1201, 14'd1206, 14'd1224, 14'd1249, 14'd1300},
    '{14'd1750, 14'd1773, 14'd1800, 14'd1827, 14'd1850, 14'd1863, 14'd1881, 14'd1901},
    '{14'd2475, 14'd2484, 14'd2493, 14'd2511, 14'd2529, 14'd2551, 14'd2637, 14'd2650},
    '{14'd4250, 14'd4266, 14'd4284, 14'd4300, 14'd4311, 14'd4320, 14'd4410, 14'd4450},
    '{14'd4986, 14'd5000, 14'd5022, 14'd5085, 14'd5099, 14'd5112, 14'd5450, 14'd5463},
    '{14'd6732, 14'd6750, 14'd6851, 14'd6899, 14'd6912, 14'd6921, 14'd6939, 14'd6957},
    '{14'd7542, 14'd7549, 14'd7589, 14'd7600, 14'd7668, 14'd7700, 14'd8172, 14'd8201}
  };

  // Gate signals of the inverter: level switches S1..S3 (sources Vdc, 2Vdc,
  // 4Vdc) and H-bridge switches H1..H4.
  typedef struct packed {
    logic s1, s2, s3;
    logic h1, h2, h3, h4;
  } gates_t;

endpackage
