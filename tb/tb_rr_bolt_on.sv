// tb_rr_bolt_on: checks the bolt-on redundant row as a unit: random reads and writes (with
// random bit masks) at the faulty row and at other rows, with the array data Q_MEM
// driven by the testbench. After each read, Q must be the latched word of that column
// for a matching read and Q_MEM otherwise. Writes to other rows must not reach the latches.
module tb_rr_bolt_on;
  localparam int unsigned BITS = 80, MUX = 8, RA_W = 11;
  logic clk = 1'b0, cen, gwen, rren, match, mem_qsel;
  logic [RA_W-1:0] ra, fra;
  logic [2:0] ca;
  logic [BITS-1:0] d, wen, q_mem, q;
  logic [BITS-1:0] rv [MUX];
  logic [BITS-1:0] rk [MUX];
  int checks = 0, failures = 0, n_red = 0, n_mem = 0;

  rr_bolt_on #(.BITS(BITS), .MUX(MUX), .RA_W(RA_W)) dut (
    .clk(clk), .cen(cen), .gwen(gwen), .rren(rren), .ra(ra), .fra(fra), .ca(ca), .d(d),
    .wen(wen), .q_mem(q_mem), .q(q), .match(match), .mem_qsel(mem_qsel));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic hit;
    for (int i = 0; i < MUX; i++) rk[i] = '0;
    fra = 11'h155; rren = 1'b1; cen = 1'b1; gwen = 1'b1; wen = '1; d = '0; q_mem = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      cen = ($urandom_range(0, 7) == 0); gwen = ($urandom_range(0, 2) != 0);
      ra = ($urandom_range(0, 1) != 0) ? fra : RA_W'($urandom());
      ca = 3'($urandom());
      d = {$urandom(), $urandom(), $urandom()};
      wen = ($urandom_range(0, 1) != 0) ? '0 : {$urandom(), $urandom(), $urandom()};
      q_mem = {$urandom(), $urandom(), $urandom()};
      hit = rren && (ra == fra);
      @(negedge clk);
      if (!cen && !gwen && hit) begin
        rv[ca] = (rv[ca] & wen) | (d & ~wen);
        rk[ca] |= ~wen;
      end
      if (!cen && gwen) begin
        checks++;
        if (hit) begin
          n_red++;
          if (((q ^ rv[ca]) & rk[ca]) != '0) begin failures++; $display("redundant read col %0d: %h expected %h", ca, q, rv[ca]); end
        end else begin
          n_mem++;
          if (q !== q_mem) begin failures++; $display("array read: %h expected %h", q, q_mem); end
        end
      end
    end
    if (n_red == 0 || n_mem == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
