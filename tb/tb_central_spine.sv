// tb_central_spine: checks the address split, the bank decode and per-pair read enables
// for every bank, and that Banksel follows the pair of the last read and holds through
// writes and idle cycles.
module tb_central_spine;
  logic clk = 1'b0, cen, gwen, we, pair_half;
  logic [13:0] a;
  logic [2:0] ca;
  logic [7:0] row;
  logic [10:0] ra;
  logic [7:0] bank_en;
  logic [3:0] pair_rd, banksel, bs_exp;
  logic bs_known = 1'b0;
  int checks = 0, failures = 0;

  central_spine dut (.clk(clk), .cen(cen), .gwen(gwen), .a(a), .ca(ca), .row(row), .ra(ra),
                     .bank_en(bank_en), .we(we), .pair_rd(pair_rd), .pair_half(pair_half),
                     .banksel(banksel));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    $display("%s (a=%h cen=%0b gwen=%0b)", s, a, cen, gwen);
  endtask

  initial begin
    int unsigned bk;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      cen = ($urandom_range(0, 4) == 0); gwen = 1'($urandom()); a = 14'($urandom());
      bk = a[13:11];
      #1;
      checks += 6;
      if (ca !== a[2:0]) fail("ca");
      if (row !== a[10:3]) fail("row");
      if (ra !== a[13:3]) fail("ra");
      if (bank_en !== (cen ? 8'h00 : 8'h01 << bk)) fail("bank_en");
      if (pair_rd !== ((cen || !gwen) ? 4'h0 : 4'h1 << (bk / 2))) fail("pair_rd");
      if (pair_half !== bk[0] || we !== !gwen) fail("pair_half/we");
      if (!cen && gwen) begin bs_exp = 4'h1 << (bk / 2); bs_known = 1'b1; end
      @(negedge clk);
      if (bs_known) begin
        checks++;
        if (banksel !== bs_exp) fail("banksel");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
