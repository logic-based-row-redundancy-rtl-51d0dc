// red_clock_gen: the clock generator of the redundancy controller. It derives the write
// clock WCLK of the master latches (one per data bit) from the external clock CLK.
//
// WCLK pulses only on write cycles (chip enabled, GWEN low), so the master latches follow
// D only when data is to be stored. In silicon WCLK is a short, fast pulse that keeps
// the hold time on D small; in this RTL the pulse is the high phase of CLK, produced by a
// latch-based clock gate, so D must be held through the high phase of CLK.
//
// Interface: clk, cen (active low chip enable), gwen (active low write) in; wclk out.
module red_clock_gen (
  input  logic clk,
  input  logic cen,
  input  logic gwen,
  output logic wclk
);
  logic wr_en;
  assign wr_en = !cen && !gwen;
  rr_clock_gate u_gate (.clk(clk), .en(wr_en), .gclk(wclk));
endmodule
