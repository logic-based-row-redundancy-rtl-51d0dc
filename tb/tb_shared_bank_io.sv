// tb_shared_bank_io: checks that the shared IO block captures, at the rising edge of a
// read of its pair, the word of the bank that was accessed, and holds it otherwise.
module tb_shared_bank_io;
  localparam int unsigned BITS = 80;
  logic clk = 1'b0, rd, half;
  logic [BITS-1:0] rdata0, rdata1, q_pair, exp;
  logic known = 1'b0;
  int checks = 0, failures = 0;

  shared_bank_io #(.BITS(BITS)) dut (.clk(clk), .rd(rd), .half(half), .rdata0(rdata0),
                                     .rdata1(rdata1), .q_pair(q_pair));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      rd = 1'($urandom()); half = 1'($urandom());
      rdata0 = {$urandom(), $urandom(), $urandom()};
      rdata1 = {$urandom(), $urandom(), $urandom()};
      if (rd) begin exp = half ? rdata1 : rdata0; known = 1'b1; end
      @(negedge clk);
      if (known) begin
        checks++;
        if (q_pair !== exp) begin failures++; $display("q_pair=%h expected %h", q_pair, exp); end
      end
      rd = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
