// tb_sram_bank: checks one bank against a word-level model: random writes with random
// bit write enables into a small set of rows, reads of the addressed word, and writes
// ignored when the bank is not enabled or the cycle is a read.
module tb_sram_bank;
  localparam int unsigned ROWS = 256, MUX = 8, BITS = 80;
  logic clk = 1'b0, en, we;
  logic [7:0] row;
  logic [2:0] ca;
  logic [BITS-1:0] d, wen, rdata;
  logic [BITS-1:0] mv [ROWS*MUX];
  logic [BITS-1:0] mk [ROWS*MUX];
  int checks = 0, failures = 0;

  sram_bank #(.ROWS(ROWS), .MUX(MUX), .BITS(BITS)) dut (
    .clk(clk), .en(en), .we(we), .row(row), .ca(ca), .d(d), .wen(wen), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned i;
    for (int k = 0; k < ROWS*MUX; k++) mk[k] = '0;
    en = 1'b0; we = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0); we = 1'($urandom());
      row = 8'($urandom_range(0, 3)) ^ 8'hA0 ^ ((n % 7 == 0) ? 8'($urandom()) : 8'h00);
      ca = 3'($urandom());
      d = {$urandom(), $urandom(), $urandom()};
      wen = ($urandom_range(0, 1) != 0) ? '0 : {$urandom(), $urandom(), $urandom()};
      i = {row, ca};
      #1;
      checks++;
      if (((rdata ^ mv[i]) & mk[i]) != '0) begin
        failures++;
        $display("read row %0d col %0d: %h expected %h", row, ca, rdata, mv[i]);
      end
      if (en && we) begin
        mv[i] = (mv[i] & wen) | (d & ~wen);
        mk[i] |= ~wen;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
