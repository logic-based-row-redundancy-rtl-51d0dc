// central_spine: global control of the banked array. It splits the word address into
// bank, row-in-bank and column address, decodes the bank, and drives the banks and the
// shared IO blocks, which sit in pairs on either side of it (banks 2k and 2k+1 share
// one IO block). It also produces Banksel, the one-hot select of the IO block whose data
// goes to the output.
//
// Address map (this design's choice): A = {bank, row, CA}, CA in the low bits so that
// the MUX words of one physical row are consecutive addresses. The regular row address
// RA compared with the faulty row address is {bank, row}. The outputs ca, row, ra and
// pair_half are fields of the address, passed straight through.
//
// Timing: bank_en, pair_rd and pair_half are combinational, for the cycle whose rising
// edge comes next; Banksel is registered at the rising edge of a read and held until the
// next read, aligned with the read data of the shared IO blocks.
module central_spine #(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned MUX   = 8,
  parameter int unsigned BANKS = 8,
  parameter int unsigned ADDR_W = $clog2(WORDS),
  parameter int unsigned CA_W   = $clog2(MUX),
  parameter int unsigned BANK_W = $clog2(BANKS),
  parameter int unsigned ROW_W  = ADDR_W - CA_W - BANK_W,
  parameter int unsigned RA_W   = ADDR_W - CA_W,
  parameter int unsigned PAIRS  = BANKS / 2
) (
  input  logic              clk,
  input  logic              cen,        // active low chip enable
  input  logic              gwen,       // active low global write enable
  input  logic [ADDR_W-1:0] a,
  output logic [CA_W-1:0]   ca,
  output logic [ROW_W-1:0]  row,
  output logic [RA_W-1:0]   ra,
  output logic [BANKS-1:0]  bank_en,    // accessed bank, this cycle
  output logic              we,         // this cycle is a write
  output logic [PAIRS-1:0]  pair_rd,    // IO block whose bank is read, this cycle
  output logic              pair_half,  // which bank of the pair is accessed
  output logic [PAIRS-1:0]  banksel     // registered IO block select for the output
);
  logic [BANK_W-1:0] bank;

  assign ca        = a[CA_W-1:0];
  assign row       = a[CA_W +: ROW_W];
  assign bank      = a[ADDR_W-1 -: BANK_W];
  assign ra        = a[ADDR_W-1:CA_W];
  assign we        = !gwen;
  assign pair_half = bank[0];

  always_comb begin
    bank_en = '0;
    pair_rd = '0;
    if (!cen) begin
      bank_en[bank] = 1'b1;
      if (gwen) pair_rd[bank[BANK_W-1:1]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!cen && gwen) banksel <= pair_rd;
  end

  // After a read exactly one IO block is selected.
  a_banksel_onehot: assert property (@(posedge clk)
    (!cen && gwen) |=> (banksel != '0) && ((banksel & (banksel - PAIRS'(1))) == '0));
endmodule
