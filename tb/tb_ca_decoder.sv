// tb_ca_decoder: checks the column address decoder for every column address with the
// enable on (exactly the addressed bit set) and off (all outputs low).
module tb_ca_decoder;
  localparam int unsigned MUX = 8;
  logic en;
  logic [2:0] ca;
  logic [MUX-1:0] onehot;
  int checks = 0, failures = 0;

  ca_decoder #(.MUX(MUX)) dut (.en(en), .ca(ca), .onehot(onehot));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < MUX; c++) begin
        en = 1'(e); ca = 3'(c);
        #1;
        checks++;
        if (onehot !== (e != 0 ? MUX'(1) << c : '0)) begin
          failures++;
          $display("en=%0d ca=%0d: onehot=%b", e, c, onehot);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
