// tb_rr_bit: checks one row redundancy bit with its clocks driven directly.
// Writes raise WCLK and one RED_WCLK bit together, as the controller does; some writes
// pulse only RED_WCLK after D has changed, to show that the slave copies the master latch
// and not D. WEN high must leave the slave unchanged. Reads check the 8:1 multiplexer for
// every RED_QSEL value and the 2:1 selection between Q_RED and Q_MEM by MEM_QSEL.
module tb_rr_bit;
  localparam int unsigned MUX = 8;
  logic d, wen, wclk, mem_qsel, q_mem, q_red, q;
  logic [MUX-1:0] red_wclk, red_qsel, red_data;
  logic [MUX-1:0] mv, mk = '0;
  logic master_v, master_k = 1'b0;
  int checks = 0, failures = 0;

  rr_bit #(.MUX(MUX)) dut (.d(d), .wen(wen), .wclk(wclk), .red_wclk(red_wclk),
                           .red_qsel(red_qsel), .mem_qsel(mem_qsel), .q_mem(q_mem),
                           .red_data(red_data), .q_red(q_red), .q(q));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned i;
    wclk = 1'b0; red_wclk = '0; red_qsel = '0; mem_qsel = 1'b0; q_mem = 1'b0; d = 1'b0; wen = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      i = $urandom_range(0, MUX-1);
      case ($urandom_range(0, 3))
        0: begin                                  // normal write: WCLK and RED_WCLK[i]
          d = 1'($urandom()); wen = ($urandom_range(0, 3) == 0);
          #1 wclk = 1'b1; red_wclk = MUX'(1) << i;
          #4 wclk = 1'b0; red_wclk = '0;
          master_v = d; master_k = 1'b1;
          if (!wen) begin mv[i] = d; mk[i] = 1'b1; end
          #1 d = 1'($urandom());                  // D changes after the write
        end
        1: begin                                  // slave write from the held master only
          wen = 1'b0; d = ~d;
          #1 red_wclk = MUX'(1) << i;
          #4 red_wclk = '0;
          if (master_k) begin mv[i] = master_v; mk[i] = 1'b1; end
          else mk[i] = 1'b0;
        end
        default: begin                            // read
          red_qsel = MUX'(1) << i; mem_qsel = 1'($urandom()); q_mem = 1'($urandom());
          #1;
          if (mk[i]) begin
            checks += 2;
            if (q_red !== mv[i]) begin failures++; $display("Q_RED[%0d]=%0b expected %0b", i, q_red, mv[i]); end
            if (q !== (mem_qsel ? mv[i] : q_mem)) begin failures++; $display("Q wrong, mem_qsel=%0b", mem_qsel); end
          end else if (!mem_qsel) begin
            checks++;
            if (q !== q_mem) begin failures++; $display("Q not Q_MEM"); end
          end
          #4;
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
