// rr_clock_gate: glitch-free clock gate used to derive the internal write clocks of the
// redundancy logic from the external clock.
//
// The enable is captured by a latch that is transparent while clk is low, so it is
// stable for the whole high phase; the gated clock is clk AND the latched enable. The
// gated clock is therefore a copy of the high phase of clk on enabled cycles. The latch
// is intended (it is the standard integrated-clock-gate structure).
//
// Interface: clk, en in; gclk out. Timing: en must settle before the rising edge of clk.
module rr_clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;
  always_latch if (!clk) en_l = en;
  assign gclk = clk & en_l;
endmodule
