// rr_bit: one bit of the bolt-on redundant row ("per bit RR").
//
// A master latch, transparent while WCLK is high, follows the data input D. MUX slave
// latches, one for each word of the physical row, copy the master while their clock
// iRED_WCLK[i] is high. iRED_WCLK is RED_WCLK interlocked with the bit write enable WEN
// (active low): a masked bit keeps its old value and its latch does not toggle. Only
// one RED_WCLK bit is high at a time, so one master serves all slaves, which is what
// makes the redundant row small. On reads, a MUX:1 multiplexer driven by the one-hot
// RED_QSEL picks Q_RED from the slave latches, and a 2:1 multiplexer driven by MEM_QSEL
// gives Q = Q_RED when MEM_QSEL is high, else Q_MEM from the array.
//
// The latches are intended. D and WEN must be held through the high phase of CLK on a
// write cycle, since WCLK and RED_WCLK are gated copies of it. Structure follows the
// design; the one-hot AND-OR form of the read multiplexer is this design's choice.
module rr_bit #(
  parameter int unsigned MUX = 8
) (
  input  logic           d,
  input  logic           wen,        // active low bit write enable
  input  logic           wclk,
  input  logic [MUX-1:0] red_wclk,
  input  logic [MUX-1:0] red_qsel,
  input  logic           mem_qsel,
  input  logic           q_mem,
  output logic [MUX-1:0] red_data,
  output logic           q_red,
  output logic           q
);
  logic           master;
  logic [MUX-1:0] ired_wclk;

  always_latch if (wclk) master = d;

  assign ired_wclk = red_wclk & {MUX{!wen}};

  for (genvar i = 0; i < MUX; i++) begin : g_slave
    always_latch if (ired_wclk[i]) red_data[i] = master;
  end

  assign q_red = |(red_data & red_qsel);
  assign q     = mem_qsel ? q_red : q_mem;
endmodule
