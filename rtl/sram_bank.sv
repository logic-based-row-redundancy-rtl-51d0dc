// sram_bank: one bank of the SRAM array, modelled at word level. ROWS physical rows of
// MUX*BITS bitcells; the row decoder selects a row and the column mux one of its MUX
// words. Writes store, at the rising edge of clk, the bits whose active-low bit write
// enable WEN is low. The read path (bitlines and column mux) is combinational; the
// sensing and holding of the data is done by the shared IO block of the bank pair.
//
// A bank is accessed whether or not its row is the faulty one: repair is done entirely
// outside the array. The bitcell circuit, the left/right split of the bank around the
// central spine and its timing are not modelled; the array is written as a plain memory
// array, which is this design's choice.
module sram_bank #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned MUX  = 8,
  parameter int unsigned BITS = 80,
  parameter int unsigned ROW_W = $clog2(ROWS),
  parameter int unsigned CA_W  = $clog2(MUX)
) (
  input  logic             clk,
  input  logic             en,      // bank selected this cycle
  input  logic             we,      // write (else read)
  input  logic [ROW_W-1:0] row,
  input  logic [CA_W-1:0]  ca,
  input  logic [BITS-1:0]  d,
  input  logic [BITS-1:0]  wen,     // active low bit write enable
  output logic [BITS-1:0]  rdata    // word at {row, ca}, combinational
);
  logic [BITS-1:0] mem [ROWS*MUX];
  logic [ROW_W+CA_W-1:0] idx;

  assign idx   = {row, ca};
  assign rdata = mem[idx];

  always_ff @(posedge clk) begin
    if (en && we) mem[idx] <= (mem[idx] & wen) | (d & ~wen);
  end
endmodule
