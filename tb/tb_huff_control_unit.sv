// tb_huff_control_unit: checks the decoder's state machine clock by clock.
// The testbench models the address generator and the bit count of the stream
// buffer from the unit's own control outputs and answers the comparator
// input for a scripted run (2 dictionary entries, 3 symbols: entry 1 of
// length 3, entry 0 of length 30, entry 0 of length 5). The control word,
// data_ready and finish are compared with a hand-written trace of 21 clocks
// that exercises dictionary load, the double refill at the start, a refill
// after a symbol, and finish. A second run with no matching entry must end
// with error set.
module tb_huff_control_unit;
  import pcie_decomp_pkg::huff_ctrl_t;
  logic clk = 0, rst_n = 0, start = 0;
  logic [8:0] dict_size = 9'd2;
  logic [10:0] nsym = 11'd3;
  logic [7:0] addr = '0;
  logic match;
  logic [4:0] len;
  logic [6:0] count = '0;
  huff_ctrl_t ctrl;
  logic ready, finish, busy, err;
  int checks = 0, failures = 0, nsym_seen = 0;
  bit  no_match = 0;
  int  tgt_entry [3] = '{1, 0, 0};
  int  tgt_len   [3] = '{3, 30, 5};

  huff_control_unit dut (
    .clk, .rst_n, .start_i(start), .dict_size_i(dict_size), .nsym_i(nsym), .dict_addr_i(addr),
    .match_i(match), .len_i(len), .srd_count_i(count), .ctrl_o(ctrl),
    .data_ready_o(ready), .finish_o(finish), .busy_o(busy), .error_o(err));

  always #5 clk = ~clk;

  // environment model
  always_comb begin
    len   = 5'(tgt_len[nsym_seen % 3]);
    match = !no_match && (addr - 8'd1 == 8'(tgt_entry[nsym_seen % 3]));
  end
  always_ff @(posedge clk) begin
    if (ctrl.ag_reset) addr <= '0;
    else if (ctrl.ag_enable) addr <= addr + 1'b1;
    if (ctrl.srd_reset) count <= '0;
    else if (ctrl.srd_load) count <= count + 7'd32;
    else if (ctrl.srd_shift) count <= count - 7'(len);
    if (ready) nsym_seen <= nsym_seen + 1;
  end

  // expected trace: {ag_reset, ag_enable, dag_reset, dag_enable, src_reset, src_load,
  //                  srd_reset, srd_load, srd_shift, dict_write, code_rd_en, data_rd_en}, ready, finish
  typedef struct packed { logic [11:0] c; logic rdy; logic fin; } step_t;
  step_t trace [21] = '{
    '{12'b1_0_1_0_1_0_1_0_0_0_0_0, 0, 0},  // IDLE, start
    '{12'b0_0_0_0_0_0_0_0_0_0_1_0, 0, 0},  // LD_RD
    '{12'b0_0_0_0_0_1_0_0_0_0_0_0, 0, 0},  // LD_CAP
    '{12'b0_1_0_0_1_0_0_0_0_1_0_0, 0, 0},  // LD_WR entry 0
    '{12'b0_0_0_0_0_0_0_0_0_0_1_0, 0, 0},
    '{12'b0_0_0_0_0_1_0_0_0_0_0_0, 0, 0},
    '{12'b1_0_0_0_1_0_0_0_0_1_0_0, 0, 0},  // LD_WR last entry
    '{12'b0_0_0_1_0_0_0_0_0_0_0_1, 0, 0},  // FILL_RD
    '{12'b0_0_0_0_0_0_0_1_0_0_0_0, 0, 0},  // FILL_LD (empty: again)
    '{12'b0_0_0_1_0_0_0_0_0_0_0_1, 0, 0},
    '{12'b0_0_0_0_0_0_0_1_0_0_0_0, 0, 0},
    '{12'b0_1_0_0_0_0_0_0_0_0_0_0, 0, 0},  // SRCH0
    '{12'b0_1_0_0_0_0_0_0_0_0_0_0, 0, 0},  // SRCH entry 0: no
    '{12'b1_0_0_0_0_0_0_0_1_0_0_0, 1, 0},  // SRCH entry 1: symbol 1
    '{12'b0_1_0_0_0_0_0_0_0_0_0_0, 0, 0},  // SRCH0
    '{12'b1_0_0_0_0_0_0_0_1_0_0_0, 1, 0},  // entry 0: symbol 2, 31 bits left
    '{12'b0_0_0_1_0_0_0_0_0_0_0_1, 0, 0},  // FILL_RD
    '{12'b0_0_0_0_0_0_0_1_0_0_0_0, 0, 0},  // FILL_LD
    '{12'b0_1_0_0_0_0_0_0_0_0_0_0, 0, 0},  // SRCH0
    '{12'b1_0_0_0_0_0_0_0_1_0_0_0, 1, 0},  // symbol 3, last
    '{12'b0_0_0_0_0_0_0_0_0_0_0_0, 0, 1}   // IDLE, finish
  };

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (ctrl != '0 || busy) begin failures++; $display("FAIL not idle"); end
    start = 1;
    for (int i = 0; i < 21; i++) begin
      #1;
      checks++;
      if (ctrl !== trace[i].c || ready !== trace[i].rdy || finish !== trace[i].fin) begin
        failures++;
        $display("FAIL clock %0d: ctrl=%b ready=%b finish=%b expected %b %b %b",
                 i, ctrl, ready, finish, trace[i].c, trace[i].rdy, trace[i].fin);
      end
      @(negedge clk);
      start = 0;
    end
    checks++;
    if (err || busy) begin failures++; $display("FAIL error/busy after good run"); end
    // no entry matches: error after the whole dictionary was searched
    no_match = 1;
    start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < 40 && !finish; i++) @(negedge clk);
    checks++;
    if (!finish || !err) begin failures++; $display("FAIL no error on unknown code"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
