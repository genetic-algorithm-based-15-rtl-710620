// clock1mhz_gen: switching time base.
//
// Divides the board clock (50 MHz) to a 1 MHz tick and counts the ticks in
// each fundamental cycle, so that every switching instant is an exact number
// of 1 MHz pulses after the start of the cycle (20,000 pulses per 50 Hz
// cycle at the defaults, a resolution of 0.018 degrees).
//   tick    : one-clock pulse every CLK_HZ / TICK_HZ clocks.
//   clk_out : square wave at TICK_HZ, high for the first DIV/2 clocks of
//             each DIV-clock period (50 % duty when DIV is even).
//   pos     : index of the current 1 MHz pulse within the fundamental cycle,
//             0 .. TICKS_PER_CYCLE-1; advances on the clock after each tick.
//   sync    : the fundamental-cycle tick from clock50hz_gen; on it both the
//             divider and pos restart from 0 at the next edge, keeping the
//             two dividers locked to each other.
// The frequencies follow the published design; counting pulses into a
// position index and the sync input are this design's choices.
module clock1mhz_gen #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned TICK_HZ = 1_000_000,
  parameter int unsigned FOUT_HZ = 50
) (
  input  logic clk,
  input  logic rst,
  input  logic sync,
  output logic tick,
  output logic clk_out,
  output logic [$clog2(TICK_HZ / FOUT_HZ)-1:0] pos
);
  localparam int unsigned DIV = CLK_HZ / TICK_HZ;
  localparam int unsigned TPC = TICK_HZ / FOUT_HZ;   // ticks per cycle
  localparam int unsigned DW  = (DIV > 1) ? $clog2(DIV) : 1;
  localparam int unsigned PW  = $clog2(TPC);

  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    if (rst || sync) begin
      div <= '0;
      pos <= '0;
    end else begin
      if (div == DW'(DIV - 1)) div <= '0;
      else                     div <= div + 1'b1;
      if (tick) pos <= (pos == PW'(TPC - 1)) ? '0 : pos + 1'b1;
    end
  end

  assign tick    = (div == DW'(DIV - 1));
  assign clk_out = (div < DW'(DIV / 2));

  initial assert (DIV >= 2 && TPC >= 4) else $error("clock1mhz_gen: bad ratios");
endmodule
