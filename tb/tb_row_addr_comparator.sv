// tb_row_addr_comparator: checks the row address comparator against a direct equality
// reference, for random and equal address pairs with RREN on and off, and for addresses
// that differ in a single bit (every bit position).
module tb_row_addr_comparator;
  localparam int unsigned RA_W = 11;
  logic rren, match;
  logic [RA_W-1:0] ra, fra;
  int checks = 0, failures = 0;

  row_addr_comparator #(.RA_W(RA_W)) dut (.rren(rren), .ra(ra), .fra(fra), .match(match));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic e, input logic [RA_W-1:0] x, input logic [RA_W-1:0] y);
    rren = e; ra = x; fra = y;
    #1;
    checks++;
    if (match !== (e && (x == y))) begin
      failures++;
      $display("rren=%0b ra=%h fra=%h: match=%0b", e, x, y, match);
    end
  endtask

  initial begin
    logic [RA_W-1:0] r;
    for (int n = 0; n < 500; n++) begin
      r = RA_W'($urandom());
      check(1'($urandom()), r, r);
      check(1'($urandom()), r, RA_W'($urandom()));
      for (int b = 0; b < RA_W; b++) check(1'b1, r, r ^ RA_W'(1 << b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
