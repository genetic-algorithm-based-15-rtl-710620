// clock50hz_gen: fundamental-frequency clock divider.
//
// Divides the board clock (50 MHz) down to the inverter's fundamental
// frequency (50 Hz). A counter runs from 0 to DIV-1 and wraps, DIV =
// CLK_HZ / FOUT_HZ = 1,000,000 at the defaults. Two outputs are produced:
//   cycle_tick : one-clock pulse on the last clock of every output period;
//                the next clock edge begins a new fundamental cycle.
//   clk_out    : 50 % duty square wave at FOUT_HZ (high for the first half
//                of each period), for observation.
// The rest of the design stays on the board clock and uses cycle_tick as an
// enable rather than clocking logic from the divided signal; that, the
// synchronous active-high reset and the tick convention are this design's
// choices. The 50 MHz source and the 50 Hz output are the published numbers.
module clock50hz_gen #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned FOUT_HZ = 50
) (
  input  logic clk,
  input  logic rst,
  output logic cycle_tick,
  output logic clk_out
);
  localparam int unsigned DIV = CLK_HZ / FOUT_HZ;
  localparam int unsigned CW  = $clog2(DIV);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)                          cnt <= '0;
    else if (cnt == CW'(DIV - 1))     cnt <= '0;
    else                              cnt <= cnt + 1'b1;
  end

  assign cycle_tick = (cnt == CW'(DIV - 1));
  assign clk_out    = (cnt < CW'(DIV / 2));

  initial assert (DIV >= 2) else $error("clock50hz_gen: DIV must be at least 2");
endmodule
