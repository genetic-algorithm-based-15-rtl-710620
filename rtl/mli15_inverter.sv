// mli15_inverter: behavioural model (not synthesizable logic) of the power
// stage of the asymmetric 15-level inverter.
//
// Three DC sources of Vdc, 2*Vdc and 4*Vdc are stacked in series; switch Sn
// puts its source in the chain, and when Sn is open the current bypasses
// that source through its diode. The chain feeds an H-bridge H1..H4 with a
// resistive load between the two legs (H1 over H4 on the left, H2 over H3
// on the right). H1+H3 give positive load voltage, H2+H4 negative:
//     v_load = +/- Vdc * (S1 + 2*S2 + 4*S3)
// i.e. 15 levels from -7 Vdc to +7 Vdc. With neither diagonal closed the
// load is disconnected (0 V). Closing both switches of one leg is a
// shoot-through and is flagged. The model is static (no switching delays,
// losses or reactive load). Source values default to 10 V per step and the
// load to a resistor, as published; the load value is this model's choice.
module mli15_inverter
  import she_pkg::*;
#(
  parameter real VDC    = 10.0,
  parameter real R_LOAD = 100.0
) (
  input  gates_t            gates,
  output real               v_load,
  output real               i_load,
  output logic signed [3:0] level,          // v_load / Vdc, -7..7
  output logic              shoot_through
);
  logic [2:0] mag;
  assign mag = {gates.s3, gates.s2, gates.s1};

  always_comb begin
    if (gates.h1 && gates.h3 && !gates.h2 && !gates.h4)      level = $signed({1'b0, mag});
    else if (gates.h2 && gates.h4 && !gates.h1 && !gates.h3) level = -$signed({1'b0, mag});
    else                                                     level = '0;
  end

  assign shoot_through = (gates.h1 && gates.h4) || (gates.h2 && gates.h3);
  assign v_load        = VDC * real'(level);
  assign i_load        = v_load / R_LOAD;
endmodule
