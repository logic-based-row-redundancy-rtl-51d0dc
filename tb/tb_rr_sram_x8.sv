// tb_rr_sram_x8: end-to-end test of the thinnest instance, 16384 words x 8 bits, mux 8,
// 8 banks, with the same driver and checks as the default-size test.
module tb_rr_sram_x8;
  logic        clk = 1'b0;
  logic        done;
  int          checks, failures;
  logic        cen, gwen, rren, match, mem_qsel;
  logic [13:0] a;
  logic [7:0]  d, wen, q;
  logic [0:0][10:0] fra;

  rr_sram #(.WORDS(16384), .BITS(8)) dut (
    .clk(clk), .cen(cen), .gwen(gwen), .a(a), .d(d), .wen(wen), .rren(rren),
    .fra(fra), .q(q), .match(match), .mem_qsel(mem_qsel));

  rr_sram_driver #(.WORDS(16384), .BITS(8), .NOPS(40000)) drv (
    .clk(clk), .cen(cen), .gwen(gwen), .a(a), .d(d), .wen(wen), .rren(rren), .fra(fra),
    .q(q), .match(match), .mem_qsel(mem_qsel), .banksel(dut.banksel), .q_mem(dut.q_mem),
    .red_wclk(dut.g_rr[0].u_rr.red_wclk), .red_qsel(dut.g_rr[0].u_rr.red_qsel),
    .checks(checks), .failures(failures), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
