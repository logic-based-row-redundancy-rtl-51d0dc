// rr_sram_driver: stimulus, reference model and checks for the end-to-end tests of
// rr_sram, shared by the testbenches of the instance sizes. It drives the memory's pins
// and observes, besides Q, MATCH and MEM_QSEL, three internal nets passed in by the
// testbench: Banksel, the array data Q_MEM and the slave latch clocks RED_WCLK, and the
// read select RED_QSEL.
//
// A reference model keeps the array contents, the eight redundant latch words and, for
// each, which bits are known (written since start), for each of the RED_ROWS redundant
// rows; a read is answered by the last matching row. The test first replays the three
// phases of a repaired access on column 0 of the faulty row (write into the latches,
// read from the latches, read from the array), then fills the faulty row, then issues
// random reads, writes with random bit masks and idle cycles, mostly inside a small set of
// rows around the faulty one so that matches are frequent. To show that repaired reads
// come from the latches, the array behind the faulty row is overwritten while RREN is low
// and the latches must still return the old data when RREN is set again. The faulty row
// address is changed once during the test.
//
// Inputs change at the falling edge of CLK (held through the high phase); Q is checked
// at the falling edge after each read, i.e. the read data is available in the cycle of
// the read (one rising edge of latency). Each mechanism is counted: redundant write,
// redundant read, array read, array write, masked write, RREN off, idle cycle, Banksel
// disabled by MEM_QSEL; one that never happens counts as a failure. The counts of checks
// and failures are outputs; done rises when the test is over.
module rr_sram_driver #(
  parameter int unsigned WORDS = 16384,
  parameter int unsigned BITS  = 80,
  parameter int unsigned MUX   = 8,
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned RA_W   = 11,
  parameter int unsigned CA_W   = 3,
  parameter int unsigned PAIRS  = 4,
  parameter int unsigned RED_ROWS = 1,
  parameter int unsigned NOPS   = 3000
) (
  input  logic              clk,
  output logic              cen,
  output logic              gwen,
  output logic [ADDR_W-1:0] a,
  output logic [BITS-1:0]   d,
  output logic [BITS-1:0]   wen,
  output logic              rren,
  output logic [RED_ROWS-1:0][RA_W-1:0] fra,
  input  logic [BITS-1:0]   q,
  input  logic              match,
  input  logic              mem_qsel,
  input  logic [PAIRS-1:0]  banksel,
  input  logic [BITS-1:0]   q_mem,
  input  logic [MUX-1:0]    red_wclk,
  input  logic [MUX-1:0]    red_qsel,
  output int                checks,
  output int                failures,
  output logic              done
);
  int cycles = 0;
  int n_red_wr = 0, n_red_rd = 0, n_mem_rd = 0, n_mem_wr = 0, n_masked = 0;
  int n_rren_off = 0, n_idle = 0, n_bksel_off = 0;

  logic [BITS-1:0] mem_v [WORDS];
  logic [BITS-1:0] mem_k [WORDS];
  logic [BITS-1:0] red_v [RED_ROWS][MUX];
  logic [BITS-1:0] red_k [RED_ROWS][MUX];
  int              n_row_rd [RED_ROWS];

  always @(posedge clk) cycles++;

  // The redundant row that answers address ad: the last matching one, or -1.
  function automatic int hit_row(input logic [ADDR_W-1:0] ad);
    int h = -1;
    for (int r = 0; r < int'(RED_ROWS); r++)
      if (rren && ad[ADDR_W-1:CA_W] == fra[r]) h = r;
    return h;
  endfunction

  function automatic logic [BITS-1:0] rand_word();
    return BITS'({$urandom(), $urandom(), $urandom()});
  endfunction

  // One access, called at a falling edge: drive, let the rising edge take it, and check
  // at the next falling edge.
  task automatic access(input logic c, input logic g, input logic [ADDR_W-1:0] ad,
                        input logic [BITS-1:0] dd, input logic [BITS-1:0] ww);
    logic            hit;
    int              hr;
    logic [BITS-1:0] exp, kn;
    logic [BITS-1:0] q_before;
    cen = c; gwen = g; a = ad; d = dd; wen = ww;
    hr = hit_row(ad);
    hit = (hr >= 0);
    q_before = q;
    #1;
    if (!c) begin
      checks++;
      if (match !== hit) begin
        failures++;
        $display("match wrong at a=%h: %b expected %b", ad, match, hit);
      end
    end
    @(negedge clk);
    if (c) begin
      n_idle++;
      checks++;
      if (q !== q_before) begin failures++; $display("Q changed on idle cycle"); end
    end else if (!g) begin
      mem_v[ad] = (mem_v[ad] & ww) | (dd & ~ww);
      mem_k[ad] |= ~ww;
      for (int r = 0; r < int'(RED_ROWS); r++)      // every matching row stores it
        if (rren && ad[ADDR_W-1:CA_W] == fra[r]) begin
          red_v[r][ad[CA_W-1:0]] = (red_v[r][ad[CA_W-1:0]] & ww) | (dd & ~ww);
          red_k[r][ad[CA_W-1:0]] |= ~ww;
        end
      if (hit) n_red_wr++; else n_mem_wr++;
      if (ww != '0) n_masked++;
    end else begin
      if (hit) begin
        exp = red_v[hr][ad[CA_W-1:0]]; kn = red_k[hr][ad[CA_W-1:0]]; n_red_rd++; n_row_rd[hr]++;
      end
      else     begin exp = mem_v[ad];           kn = mem_k[ad];           n_mem_rd++; end
      checks++;
      if (((q ^ exp) & kn) != '0) begin
        failures++;
        $display("read a=%h hit=%0b: q=%h expected %h (known %h)", ad, hit, q, exp, kn);
      end
      checks++;
      if (mem_qsel !== hit) begin failures++; $display("MEM_QSEL wrong at a=%h", ad); end
      if (hit && banksel != '0 && q_mem == '0) n_bksel_off++;
    end
  endtask

  function automatic logic [ADDR_W-1:0] pick_addr();
    logic [RA_W-1:0] r;
    int k = $urandom_range(0, RED_ROWS-1);
    case ($urandom_range(0, 3))
      0, 1: r = fra[k];
      2:    r = fra[k] ^ RA_W'(1 << $urandom_range(0, RA_W-1));   // neighbour rows, other banks
      default: r = RA_W'($urandom());
    endcase
    return {r, CA_W'($urandom())};
  endfunction

  initial begin
    logic [ADDR_W-1:0] ad;
    checks = 0; failures = 0; done = 1'b0;
    for (int i = 0; i < WORDS; i++) mem_k[i] = '0;
    for (int r = 0; r < int'(RED_ROWS); r++) begin
      n_row_rd[r] = 0;
      fra[r] = RA_W'(11'h2A5 + 37 * r);
      for (int i = 0; i < MUX; i++) red_k[r][i] = '0;
    end
    cen = 1'b1; gwen = 1'b1; a = '0; d = '0; wen = '1;
    rren = 1'b1;
    repeat (3) @(negedge clk);

    // The three phases of a repaired access, on column 0 of faulty row 0.
    // Write at redundant: MATCH and RED_WCLK[0] in the high phase of CLK.
    fork
      access(1'b0, 1'b0, {fra[0], CA_W'(0)}, rand_word(), '0);
      begin
        @(posedge clk); #1;
        checks++;
        if (red_wclk !== MUX'(1)) begin failures++; $display("RED_WCLK=%b in write phase", red_wclk); end
      end
    join
    // Read from redundant: RED_QSEL[0] and MEM_QSEL set, Q from the latches.
    access(1'b0, 1'b1, {fra[0], CA_W'(0)}, '0, '1);
    checks++;
    if (red_qsel !== MUX'(1) || mem_qsel !== 1'b1) begin failures++; $display("read-from-redundant selects wrong"); end
    // Read from memory: no match, MEM_QSEL low, Q from the array.
    access(1'b0, 1'b0, {fra[0] ^ RA_W'(1), CA_W'(0)}, rand_word(), '0);
    access(1'b0, 1'b1, {fra[0] ^ RA_W'(1), CA_W'(0)}, '0, '1);
    checks++;
    if (mem_qsel !== 1'b0) begin failures++; $display("read-from-memory MEM_QSEL high"); end

    // Fill the faulty rows (array and latches) with full writes and read them back.
    for (int r = 0; r < int'(RED_ROWS); r++) begin
      for (int c = 0; c < MUX; c++) access(1'b0, 1'b0, {fra[r], CA_W'(c)}, rand_word(), '0);
      for (int c = 0; c < MUX; c++) access(1'b0, 1'b1, {fra[r], CA_W'(c)}, '0, '1);
    end

    // The array under the faulty rows is overwritten without redundancy...
    rren = 1'b0;
    for (int r = 0; r < int'(RED_ROWS); r++)
      for (int c = 0; c < MUX; c++) begin
        access(1'b0, 1'b0, {fra[r], CA_W'(c)}, rand_word(), '0);
        n_rren_off++;
      end
    for (int c = 0; c < MUX; c++) access(1'b0, 1'b1, {fra[0], CA_W'(c)}, '0, '1);
    // ... and the latches must still hold the old words once repair is on again.
    rren = 1'b1;
    for (int r = 0; r < int'(RED_ROWS); r++)
      for (int c = 0; c < MUX; c++) access(1'b0, 1'b1, {fra[r], CA_W'(c)}, '0, '1);

    // Random traffic.
    for (int n = 0; n < int'(NOPS); n++) begin
      ad = pick_addr();
      case ($urandom_range(0, 9))
        0:          access(1'b1, 1'($urandom()), ad, rand_word(), rand_word());
        1, 2, 3:    access(1'b0, 1'b0, ad, rand_word(), ($urandom_range(0, 1) != 0) ? '0 : rand_word());
        default:    access(1'b0, 1'b1, ad, '0, '1);
      endcase
      if (n == 1500) fra[0] = RA_W'(11'h013);  // a new faulty row: latches keep old data
    end

    if (n_red_wr == 0)   begin failures++; $display("no redundant write");  end
    if (n_red_rd == 0)   begin failures++; $display("no redundant read");   end
    if (n_mem_rd == 0)   begin failures++; $display("no array read");       end
    if (n_mem_wr == 0)   begin failures++; $display("no array write");      end
    if (n_masked == 0)   begin failures++; $display("no masked write");     end
    if (n_rren_off == 0) begin failures++; $display("no RREN-off access");  end
    if (n_idle == 0)     begin failures++; $display("no idle cycle");       end
    if (n_bksel_off == 0) begin failures++; $display("Banksel never disabled"); end
    for (int r = 0; r < int'(RED_ROWS); r++)
      if (n_row_rd[r] == 0) begin failures++; $display("redundant row %0d never read", r); end
    $display("redundant writes %0d, redundant reads %0d, array reads %0d, array writes %0d",
             n_red_wr, n_red_rd, n_mem_rd, n_mem_wr);
    $display("masked writes %0d, RREN-off writes %0d, idle %0d, Banksel disabled %0d, cycles %0d",
             n_masked, n_rren_off, n_idle, n_bksel_off, cycles);
    done = 1'b1;
  end
endmodule
