// tb_rr_sram: end-to-end test of the row-redundant SRAM at its default size, the large
// instance of 16384 words x 80 bits, mux 8, 8 banks. The memory is instantiated with its
// default parameters; rr_sram_driver supplies the stimulus, the reference model and the
// checks (see that file), and this module passes it the internal nets it observes,
// reports the result and stops the simulation (with a watchdog).
module tb_rr_sram;
  logic        clk = 1'b0;
  logic        done;
  int          checks, failures;
  logic        cen, gwen, rren, match, mem_qsel;
  logic [13:0] a;
  logic [79:0] d, wen, q;
  logic [0:0][10:0] fra;

  rr_sram dut (.clk(clk), .cen(cen), .gwen(gwen), .a(a), .d(d), .wen(wen), .rren(rren),
               .fra(fra), .q(q), .match(match), .mem_qsel(mem_qsel));

  rr_sram_driver #(.WORDS(16384), .BITS(80), .NOPS(40000)) drv (
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
