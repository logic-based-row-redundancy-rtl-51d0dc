// red_controller: the redundancy controller of the bolt-on redundant row. It holds the
// row address comparator, the column decoder and the clock generator, and produces every
// control signal of the per-bit redundancy cells:
//   WCLK          write clock of the master latches (write cycles only);
//   MATCH         RA equals FRA and RREN is set;
//   RED_WCLK[i]   write clock of slave latch i: CLK gated by MATCH, write and CA == i;
//   RED_QSEL[i]   selects slave latch i for reading: CA decoded, registered on reads;
//   MEM_QSEL      high when the last read matched the faulty row, so the output comes
//                 from the latches instead of the array.
// The comparison runs in parallel with the memory access, which is started regardless.
//
// Timing: address and control are sampled at the rising edge of CLK, as by the memory.
// RED_WCLK is a gated copy of the high phase of CLK (write phase of the slave latches).
// RED_QSEL and MEM_QSEL are registered at the rising edge of a read cycle and held until
// the next read, which matches the read data of the array, available in the same cycle.
// Registering them, the choice of a clock gate for RED_WCLK and the chip enable CEN are
// this design's choices; which inputs form each signal follows the published scheme.
module red_controller #(
  parameter int unsigned RA_W = 11,
  parameter int unsigned MUX  = 8,
  parameter int unsigned CA_W = $clog2(MUX)
) (
  input  logic            clk,
  input  logic            cen,       // active low chip enable
  input  logic            gwen,      // active low global write enable
  input  logic            rren,      // row redundancy enable
  input  logic [RA_W-1:0] ra,        // regular row address
  input  logic [RA_W-1:0] fra,       // faulty row address
  input  logic [CA_W-1:0] ca,        // column address
  output logic            wclk,
  output logic            match,
  output logic [MUX-1:0]  red_wclk,
  output logic [MUX-1:0]  red_qsel,
  output logic            mem_qsel
);
  logic [MUX-1:0] ca_dec;
  logic           rd_cyc, wr_cyc;

  assign rd_cyc = !cen &&  gwen;
  assign wr_cyc = !cen && !gwen;

  row_addr_comparator #(.RA_W(RA_W)) u_cmp (.rren(rren), .ra(ra), .fra(fra), .match(match));

  ca_decoder #(.MUX(MUX), .CA_W(CA_W)) u_cadec (.en(1'b1), .ca(ca), .onehot(ca_dec));

  red_clock_gen u_clkgen (.clk(clk), .cen(cen), .gwen(gwen), .wclk(wclk));

  // Write clock for redundancy: one gated clock per slave latch.
  for (genvar i = 0; i < MUX; i++) begin : g_red_wclk
    rr_clock_gate u_gate (.clk(clk), .en(wr_cyc && match && ca_dec[i]), .gclk(red_wclk[i]));
  end

  // At most one slave latch of a bit may be open at a time.
  always_comb begin
    assert ((red_wclk & (red_wclk - MUX'(1))) == '0)
      else $error("more than one RED_WCLK bit high: %b", red_wclk);
  end

  // Read selects: column select of the 8:1 mux and memory/redundant select.
  always_ff @(posedge clk) begin
    if (rd_cyc) begin
      red_qsel <= ca_dec;
      mem_qsel <= match;
    end
  end
endmodule
