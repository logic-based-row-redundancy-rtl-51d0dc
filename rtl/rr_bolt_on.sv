// rr_bolt_on: the bolt-on redundant row, placed next to the bank output multiplexer.
// It is the redundancy controller plus one rr_bit per data bit; it needs no redundant
// bitcells and does not touch the array, the row decoders or the address path.
//
// Every access reaches the array as usual. In parallel the controller compares RA with
// FRA. A matching write is also stored in the slave latches of the word selected by CA
// (bits with WEN low only). A matching read returns the latch contents: MEM_QSEL
// switches every output bit from Q_MEM to the redundant data.
//
// Interface: the memory's own inputs (clk, cen, gwen, ra, ca, d, wen), the repair
// inputs rren and fra, the array data q_mem; outputs q and the control signals match
// and mem_qsel (mem_qsel is used to disable Banksel). Timing: as red_controller.
module rr_bolt_on #(
  parameter int unsigned BITS = 80,
  parameter int unsigned MUX  = 8,
  parameter int unsigned RA_W = 11,
  parameter int unsigned CA_W = $clog2(MUX)
) (
  input  logic            clk,
  input  logic            cen,
  input  logic            gwen,
  input  logic            rren,
  input  logic [RA_W-1:0] ra,
  input  logic [RA_W-1:0] fra,
  input  logic [CA_W-1:0] ca,
  input  logic [BITS-1:0] d,
  input  logic [BITS-1:0] wen,
  input  logic [BITS-1:0] q_mem,
  output logic [BITS-1:0] q,
  output logic            match,
  output logic            mem_qsel
);
  logic           wclk;
  logic [MUX-1:0] red_wclk, red_qsel;

  red_controller #(.RA_W(RA_W), .MUX(MUX), .CA_W(CA_W)) u_ctrl (
    .clk(clk), .cen(cen), .gwen(gwen), .rren(rren), .ra(ra), .fra(fra), .ca(ca),
    .wclk(wclk), .match(match), .red_wclk(red_wclk), .red_qsel(red_qsel), .mem_qsel(mem_qsel)
  );

  for (genvar b = 0; b < BITS; b++) begin : g_bit
    rr_bit #(.MUX(MUX)) u_bit (
      .d(d[b]), .wen(wen[b]), .wclk(wclk), .red_wclk(red_wclk), .red_qsel(red_qsel),
      .mem_qsel(mem_qsel), .q_mem(q_mem[b]), .red_data(), .q_red(), .q(q[b])
    );
  end
endmodule
