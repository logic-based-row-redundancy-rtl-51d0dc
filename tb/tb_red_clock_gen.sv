// tb_red_clock_gen: checks that WCLK copies the high phase of CLK on write cycles only
// (CEN low, GWEN high is a read, CEN high is idle), stays low while CLK is low, and is not
// disturbed when GWEN changes in the middle of the high phase (the enable is latched).
module tb_red_clock_gen;
  logic clk = 1'b0, cen, gwen, wclk;
  int checks = 0, failures = 0, pulses = 0;

  red_clock_gen dut (.clk(clk), .cen(cen), .gwen(gwen), .wclk(wclk));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    cen = 1'b1; gwen = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      cen = 1'($urandom()); gwen = 1'($urandom());
      exp = !cen && !gwen;
      #2;                          // clk low
      checks++;
      if (wclk !== 1'b0) begin failures++; $display("WCLK high while CLK low"); end
      @(posedge clk); #2;
      checks++;
      if (wclk !== exp) begin failures++; $display("cycle %0d: WCLK=%0b expected %0b", n, wclk, exp); end
      if (wclk) pulses++;
      gwen = ~gwen;                // change in the high phase must not matter
      #1;
      checks++;
      if (wclk !== exp) begin failures++; $display("cycle %0d: WCLK glitched", n); end
      @(negedge clk);
    end
    if (pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
