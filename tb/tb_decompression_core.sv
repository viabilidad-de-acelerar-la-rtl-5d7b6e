// tb_decompression_core: one decompression core against behavioural
// dictionary, compressed and decompressed memories (one-clock reads).
// Each run encodes random symbols, starts the core, and checks that word i of
// the output memory is symbol_i * K + Minimum, that exactly nsym words were
// written, that busy covers the run, that done is set at the end, and that
// done rises one clock after the decoder finishes (its clock count + 1).
module tb_decompression_core;
  import tb_huff_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [8:0] dict_size = 9'(NS);
  logic [10:0] nsym = '0;
  logic [31:0] k = '0, mn = '0;
  logic dict_rd_en, comp_rd_en, dec_wr_en, busy, done, err;
  logic [9:0] dict_rd_a, comp_rd_a, dec_wr_a;
  logic [31:0] dict_rd_d, comp_rd_d, dec_wr_d;
  logic [31:0] dict_mem [1024];
  logic [31:0] comp_mem [1024];
  logic [31:0] dec_mem  [1024];
  int checks = 0, failures = 0, writes = 0;
  int idx [$];
  logic [31:0] words [$];

  decompression_core dut (
    .clk, .rst_n, .start_i(start), .dict_size_i(dict_size), .nsym_i(nsym), .k_i(k), .min_i(mn),
    .dict_rd_en_o(dict_rd_en), .dict_rd_a_o(dict_rd_a), .dict_rd_d_i(dict_rd_d),
    .comp_rd_en_o(comp_rd_en), .comp_rd_a_o(comp_rd_a), .comp_rd_d_i(comp_rd_d),
    .dec_wr_en_o(dec_wr_en), .dec_wr_a_o(dec_wr_a), .dec_wr_d_o(dec_wr_d),
    .busy_o(busy), .done_o(done), .error_o(err));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (dict_rd_en) dict_rd_d <= dict_mem[dict_rd_a];
    if (comp_rd_en) comp_rd_d <= comp_mem[comp_rd_a];
    if (dec_wr_en) begin
      dec_mem[dec_wr_a] <= dec_wr_d;
      writes <= writes + 1;
    end
  end

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    dict_rd_d = '0; comp_rd_d = '0;
    for (int i = 0; i < 1024; i++) begin
      dict_mem[i] = (i < NS) ? dict_word(i) : '0;
      comp_mem[i] = '0;
      dec_mem[i] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      automatic int n = (t == 0) ? 3 : $urandom_range(200, 1024);
      int cyc, w0;
      idx.delete();
      for (int s = 0; s < n; s++) idx.push_back(pick_index());
      void'(encode(idx, words));
      foreach (words[w]) comp_mem[w] = words[w];
      k = $urandom; mn = $urandom;
      nsym = 11'(n);
      w0 = writes;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low during run"); end
        @(negedge clk);
        cyc++;
      end
      check(cyc, expected_cycles(idx, NS) + 1, "clocks start to done");
      check(writes - w0, n, "samples written");
      check(err, 0, "no error");
      @(negedge clk);
      check(busy, 0, "idle");
      for (int s = 0; s < n; s++)
        check(dec_mem[s], 32'(sym_of(idx[s]) * k + mn), $sformatf("sample %0d", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
