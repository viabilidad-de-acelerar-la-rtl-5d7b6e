// tb_huffman_decoder: end-to-end test of the Huffman decoder with behavioural
// dictionary and compressed-data memories (one-clock read latency).
// Runs several streams of random symbols drawn from a skewed distribution,
// checks every decoded symbol in order, the symbol count, the total clock
// count against the decoder's timing formula, and that a code not in the
// dictionary ends the run with error set.
module tb_huffman_decoder;
  import tb_huff_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [8:0] dict_size = '0;
  logic [10:0] nsym = '0;
  logic code_rd_en, data_rd_en, ready, finish, busy, err;
  logic [9:0] code_rd_a, data_rd_a;
  logic [31:0] code_in, data_in;
  logic [7:0] dout;
  logic [31:0] dict_mem [1024];
  logic [31:0] data_mem [1024];
  int checks = 0, failures = 0;
  int exp_idx [$];
  logic [31:0] words [$];
  int got_n, cyc;

  huffman_decoder dut (
    .clk, .rst_n, .start_i(start), .dict_size_i(dict_size), .nsym_i(nsym),
    .code_rd_en_o(code_rd_en), .code_rd_a_o(code_rd_a), .code_in_i(code_in),
    .data_rd_en_o(data_rd_en), .data_rd_a_o(data_rd_a), .data_in_i(data_in),
    .data_out_o(dout), .data_ready_o(ready), .finish_o(finish), .busy_o(busy), .error_o(err));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (code_rd_en) code_in <= dict_mem[code_rd_a];
    if (data_rd_en) data_in <= data_mem[data_rd_a];
  end

  // check symbols as they come out
  always @(posedge clk) if (rst_n && ready) begin
    checks++;
    if (got_n >= exp_idx.size() || dout !== sym_of(exp_idx[got_n])) begin
      failures++;
      $display("FAIL symbol %0d: got %h expected %h", got_n, dout,
               got_n < exp_idx.size() ? sym_of(exp_idx[got_n]) : 8'hxx);
    end
    got_n++;
  end

  task automatic check(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input int n, output int cycles);
    got_n = 0;
    @(negedge clk); start = 1; nsym = 11'(n);
    @(negedge clk); start = 0;
    cycles = 1;
    while (!finish) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    code_in = '0; data_in = '0;
    for (int i = 0; i < 1024; i++) begin
      dict_mem[i] = '0; data_mem[i] = '0;
    end
    for (int i = 0; i < NS; i++) dict_mem[i] = dict_word(i);
    dict_size = 9'(NS);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      automatic int n = (t == 0) ? 1 : (t == 1) ? 40 : $urandom_range(100, 1000);
      int nw;
      exp_idx.delete();
      for (int s = 0; s < n; s++) exp_idx.push_back((t == 1) ? (s % NS) : pick_index());
      nw = encode(exp_idx, words);
      if (nw > 1022) begin
        failures++;
        $display("stream too long");
      end
      for (int w = 0; w < 1024; w++) data_mem[w] = (w < nw) ? words[w] : $urandom;
      run(n, cyc);
      check(got_n, n, "symbols decoded");
      $display("run %0d: %0d symbols, %0d words, %0d clocks, checks %0d", t, n, nw, cyc, checks);
      check(int'(err), 0, "no error");
      check(cyc, expected_cycles(exp_idx, NS), "clock count");
      @(negedge clk);
      check(int'(busy), 0, "idle after finish");
    end
    // a code that is not in the dictionary
    exp_idx.delete();
    exp_idx.push_back(0);
    data_mem[0] = {code_of(0)[1:0], 30'h3FFF_FFFF};
    data_mem[1] = 32'hFFFF_FFFF;
    run(5, cyc);
    check(got_n, 1, "symbols before the bad code");
    check(int'(err), 1, "error on unknown code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
