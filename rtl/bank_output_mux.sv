// bank_output_mux: the output multiplexer of the banked memory. Banksel (one-hot, one
// bit per shared IO block) picks the data of the IO block that was read and gives
// Q_MEM. When MEM_QSEL selects the redundant latches, Banksel is disabled, so no IO
// block drives the output and the redundant data is the only source.
//
// One-hot AND-OR form; combinational.
module bank_output_mux #(
  parameter int unsigned BITS  = 80,
  parameter int unsigned PAIRS = 4
) (
  input  logic [PAIRS-1:0]           banksel,
  input  logic                       mem_qsel,
  input  logic [PAIRS-1:0][BITS-1:0] q_pair,
  output logic [BITS-1:0]            q_mem
);
  always_comb begin
    q_mem = '0;
    for (int unsigned p = 0; p < PAIRS; p++)
      if (banksel[p] && !mem_qsel) q_mem |= q_pair[p];
  end
endmodule
