// rr_pkg: shared sizes of the row-redundant SRAM.
//
// The default instance is the large one used for all timing and area figures of the
// design: 16384 words of 80 bits, column mux 8 (640 physical columns) and 8 banks.
// With mux 8 a physical row holds 8 words, so the memory has 2048 rows, 256 per bank.
// The redundant row is one such physical row: 8 words of 80 bits, kept in latches.
// One redundant row is the standard configuration; more can be bolted on.
package rr_pkg;
  localparam int unsigned WORDS = 16384;  // words in the instance
  localparam int unsigned BITS  = 80;     // data bits per word
  localparam int unsigned MUX   = 8;      // words per physical row (column mux)
  localparam int unsigned BANKS = 8;      // banks, paired around shared IO
  localparam int unsigned RED_ROWS = 1;   // bolt-on redundant rows
endpackage
