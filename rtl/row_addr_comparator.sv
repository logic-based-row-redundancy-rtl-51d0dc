// row_addr_comparator: compares the regular row address (RA) of the current access with
// the faulty row address (FRA) recorded at wafer test or by BIST, and raises the Match
// signal when they are equal and row redundancy is enabled (RREN).
//
// It is a pure equality comparator, working in parallel with the memory access: the
// memory array is accessed whatever the comparison gives, so the comparison adds nothing
// to the address setup time. RA includes the bank bits, so one redundant row can replace
// any row of the instance. The gating with RREN follows the published scheme; the width of RA is
// derived from the instance size (this design's choice: log2(words/mux) bits).
//
// Interface: rren, ra, fra in; match out. Timing: combinational.
module row_addr_comparator #(
  parameter int unsigned RA_W = 11
) (
  input  logic            rren,
  input  logic [RA_W-1:0] ra,
  input  logic [RA_W-1:0] fra,
  output logic            match
);
  always_comb match = rren && (ra == fra);
endmodule
