// rr_sram: banked single-port SRAM with flop-based bolt-on row redundancy.
//
// One faulty physical row (MUX words) is repaired by a row of latches placed next to the
// bank output multiplexer instead of by spare bitcell rows inside the banks. Every access
// goes to the array at the received address, faulty or not. In parallel the redundancy
// controller compares the row address with the faulty row address FRA: a matching write
// is also stored in the latches, a matching read is answered from the latches, and
// Banksel is disabled so the array data is ignored. Since the comparison is done while
// the array is being accessed and only the final output selection depends on it, the
// address setup time is the same as without redundancy.
//
// Default size: 16384 words x 80 bits, mux 8, 8 banks (2048 rows of 640 bitcells), one
// redundant row. Address A = {bank[2:0], row[7:0], CA[2:0]}; FRA is {bank, row}, 11 bits.
//
// More redundant rows can be bolted on (RED_ROWS, one FRA each). Every row has its own
// controller and latches; their output multiplexers are chained, Q_MEM -> row 0 -> row 1
// ... -> Q, so a matching row replaces what comes before it (FRAs are meant to differ).
// Banksel is disabled when any row matches. One row is the configuration the scheme is
// sized for; the chaining of several is this design's choice.
//
// Interface (single clock CLK):
//   CEN  active low chip enable, GWEN active low write, A address, D data in,
//   WEN  active low bit write enable, RREN row redundancy enable, FRA faulty row
//   address per redundant row, Q data out, MATCH and MEM_QSEL (any row) for observation.
// Timing: A, CEN, GWEN are sampled at the rising edge of CLK. On writes D and WEN are
// sampled there by the array and also followed by the redundancy latches through the high
// phase of CLK, so they must be held until CLK falls. Read data appears on Q after the
// rising edge of the read cycle and holds until the next read. RREN and FRA are static.
module rr_sram #(
  parameter int unsigned WORDS = rr_pkg::WORDS,
  parameter int unsigned BITS  = rr_pkg::BITS,
  parameter int unsigned MUX   = rr_pkg::MUX,
  parameter int unsigned BANKS = rr_pkg::BANKS,
  parameter int unsigned RED_ROWS = rr_pkg::RED_ROWS,
  parameter int unsigned ADDR_W = $clog2(WORDS),
  parameter int unsigned CA_W   = $clog2(MUX),
  parameter int unsigned BANK_W = $clog2(BANKS),
  parameter int unsigned ROW_W  = ADDR_W - CA_W - BANK_W,
  parameter int unsigned RA_W   = ADDR_W - CA_W
) (
  input  logic              clk,
  input  logic              cen,
  input  logic              gwen,
  input  logic [ADDR_W-1:0] a,
  input  logic [BITS-1:0]   d,
  input  logic [BITS-1:0]   wen,
  input  logic              rren,
  input  logic [RED_ROWS-1:0][RA_W-1:0] fra,
  output logic [BITS-1:0]   q,
  output logic              match,
  output logic              mem_qsel
);
  localparam int unsigned PAIRS = BANKS / 2;
  localparam int unsigned ROWS  = WORDS / (MUX * BANKS);

  logic [CA_W-1:0]  ca;
  logic [ROW_W-1:0] row;
  logic [RA_W-1:0]  ra;
  logic [BANKS-1:0] bank_en;
  logic             we, pair_half;
  logic [PAIRS-1:0] pair_rd, banksel;
  logic [BANKS-1:0][BITS-1:0] rdata;
  logic [PAIRS-1:0][BITS-1:0] q_pair;
  logic [BITS-1:0]  q_mem;
  logic [RED_ROWS:0][BITS-1:0] q_chain;
  logic [RED_ROWS-1:0] match_r, mem_qsel_r;

  central_spine #(.WORDS(WORDS), .MUX(MUX), .BANKS(BANKS)) u_spine (
    .clk(clk), .cen(cen), .gwen(gwen), .a(a), .ca(ca), .row(row), .ra(ra),
    .bank_en(bank_en), .we(we), .pair_rd(pair_rd), .pair_half(pair_half), .banksel(banksel)
  );

  for (genvar k = 0; k < BANKS; k++) begin : g_bank
    sram_bank #(.ROWS(ROWS), .MUX(MUX), .BITS(BITS)) u_bank (
      .clk(clk), .en(bank_en[k]), .we(we), .row(row), .ca(ca), .d(d), .wen(wen),
      .rdata(rdata[k])
    );
  end

  for (genvar p = 0; p < PAIRS; p++) begin : g_pair
    shared_bank_io #(.BITS(BITS)) u_io (
      .clk(clk), .rd(pair_rd[p]), .half(pair_half), .rdata0(rdata[2*p]), .rdata1(rdata[2*p+1]),
      .q_pair(q_pair[p])
    );
  end

  bank_output_mux #(.BITS(BITS), .PAIRS(PAIRS)) u_omux (
    .banksel(banksel), .mem_qsel(mem_qsel), .q_pair(q_pair), .q_mem(q_mem)
  );

  assign q_chain[0] = q_mem;

  for (genvar r = 0; r < RED_ROWS; r++) begin : g_rr
    rr_bolt_on #(.BITS(BITS), .MUX(MUX), .RA_W(RA_W), .CA_W(CA_W)) u_rr (
      .clk(clk), .cen(cen), .gwen(gwen), .rren(rren), .ra(ra), .fra(fra[r]), .ca(ca),
      .d(d), .wen(wen), .q_mem(q_chain[r]), .q(q_chain[r+1]), .match(match_r[r]),
      .mem_qsel(mem_qsel_r[r])
    );
  end

  assign q        = q_chain[RED_ROWS];
  assign match    = |match_r;
  assign mem_qsel = |mem_qsel_r;
endmodule
