// shared_bank_io: the IO block shared by two banks ("shared bank 01" etc.), holding the
// sense amplifiers and output stage of the pair. On a read of either bank it captures,
// at the rising edge of clk, the word of the accessed bank and drives it as Q_bankXY
// until the next read of the pair.
//
// Capturing at the clock edge stands in for the sense amplifier enable; this and the
// one-cycle read latency that follows are this design's choices.
module shared_bank_io #(
  parameter int unsigned BITS = 80
) (
  input  logic            clk,
  input  logic            rd,       // a bank of this pair is read this cycle
  input  logic            half,     // 0: even bank, 1: odd bank
  input  logic [BITS-1:0] rdata0,
  input  logic [BITS-1:0] rdata1,
  output logic [BITS-1:0] q_pair
);
  always_ff @(posedge clk) begin
    if (rd) q_pair <= half ? rdata1 : rdata0;
  end
endmodule
