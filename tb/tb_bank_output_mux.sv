// tb_bank_output_mux: checks that Banksel picks the data of the selected shared IO block,
// that no selection gives zero, and that MEM_QSEL disables every IO block.
module tb_bank_output_mux;
  localparam int unsigned BITS = 80, PAIRS = 4;
  logic [PAIRS-1:0] banksel;
  logic mem_qsel;
  logic [PAIRS-1:0][BITS-1:0] q_pair;
  logic [BITS-1:0] q_mem, exp;
  int checks = 0, failures = 0;

  bank_output_mux #(.BITS(BITS), .PAIRS(PAIRS)) dut (
    .banksel(banksel), .mem_qsel(mem_qsel), .q_pair(q_pair), .q_mem(q_mem));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      for (int p = 0; p < PAIRS; p++) q_pair[p] = {$urandom(), $urandom(), $urandom()};
      mem_qsel = ($urandom_range(0, 3) == 0);
      banksel = ($urandom_range(0, 4) == 0) ? '0 : PAIRS'(1) << $urandom_range(0, PAIRS-1);
      exp = '0;
      for (int p = 0; p < PAIRS; p++) if (banksel[p] && !mem_qsel) exp = q_pair[p];
      #1;
      checks++;
      if (q_mem !== exp) begin
        failures++;
        $display("banksel=%b mem_qsel=%0b: q_mem=%h expected %h", banksel, mem_qsel, q_mem, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
