// tb_red_controller: checks the redundancy controller cycle by cycle against a reference.
// In the high phase of CLK: WCLK is high exactly on write cycles, and RED_WCLK has the
// bit of CA set exactly on matching writes. After the rising edge of a read: RED_QSEL is
// the decoded CA and MEM_QSEL equals the match; both hold through writes and idle cycles.
// MATCH is checked combinationally. Addresses are drawn so that half of them match.
module tb_red_controller;
  localparam int unsigned RA_W = 11, MUX = 8;
  logic clk = 1'b0, cen, gwen, rren, wclk, match, mem_qsel;
  logic [RA_W-1:0] ra, fra;
  logic [2:0] ca;
  logic [MUX-1:0] red_wclk, red_qsel, qsel_exp;
  logic msel_exp, known = 1'b0;
  int checks = 0, failures = 0, n_wr_match = 0, n_rd_match = 0;

  red_controller #(.RA_W(RA_W), .MUX(MUX)) dut (
    .clk(clk), .cen(cen), .gwen(gwen), .rren(rren), .ra(ra), .fra(fra), .ca(ca),
    .wclk(wclk), .match(match), .red_wclk(red_wclk), .red_qsel(red_qsel), .mem_qsel(mem_qsel));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic hit, wr, rd;
    fra = 11'h3C7;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      cen = ($urandom_range(0, 5) == 0); gwen = 1'($urandom());
      rren = ($urandom_range(0, 7) != 0);
      ra = ($urandom_range(0, 1) != 0) ? fra : RA_W'($urandom());
      ca = 3'($urandom());
      hit = rren && (ra == fra); wr = !cen && !gwen; rd = !cen && gwen;
      #1;
      checks++;
      if (match !== hit) begin failures++; $display("match=%0b expected %0b", match, hit); end
      if (wr && hit) n_wr_match++;
      if (rd && hit) n_rd_match++;
      if (rd) begin qsel_exp = MUX'(1) << ca; msel_exp = hit; known = 1'b1; end
      @(posedge clk); #1;
      checks += 2;
      if (wclk !== wr) begin failures++; $display("WCLK=%0b expected %0b", wclk, wr); end
      if (red_wclk !== ((wr && hit) ? MUX'(1) << ca : '0)) begin
        failures++; $display("RED_WCLK=%b (wr=%0b hit=%0b ca=%0d)", red_wclk, wr, hit, ca);
      end
      if (known) begin
        checks += 2;
        if (red_qsel !== qsel_exp) begin failures++; $display("RED_QSEL=%b expected %b", red_qsel, qsel_exp); end
        if (mem_qsel !== msel_exp) begin failures++; $display("MEM_QSEL=%0b expected %0b", mem_qsel, msel_exp); end
      end
      @(negedge clk); #1;
      checks++;
      if (wclk !== 1'b0 || red_wclk !== '0) begin failures++; $display("clock high while CLK low"); end
    end
    if (n_wr_match == 0 || n_rd_match == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
