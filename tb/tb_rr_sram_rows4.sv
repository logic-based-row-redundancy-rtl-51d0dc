// tb_rr_sram_rows4: end-to-end test of the default instance with four bolt-on redundant
// rows instead of one (each with its own faulty row address), with the same driver and
// checks as the default-size test.
module tb_rr_sram_rows4;
  logic        clk = 1'b0;
  logic        done;
  int          checks, failures;
  logic        cen, gwen, rren, match, mem_qsel;
  logic [13:0] a;
  logic [79:0] d, wen, q;
  logic [3:0][10:0] fra;

  rr_sram #(.RED_ROWS(4)) dut (
    .clk(clk), .cen(cen), .gwen(gwen), .a(a), .d(d), .wen(wen), .rren(rren),
    .fra(fra), .q(q), .match(match), .mem_qsel(mem_qsel));

  rr_sram_driver #(.RED_ROWS(4), .NOPS(40000)) drv (
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
