// tb_pcie_decompressor_top: end-to-end run of the whole design at its
// default sizes, following the transfer schedule of the design: the host
// writes the parameters, then the Huffman dictionary into every memory of
// the dictionary bank, then compressed section k into memory k of the
// compressed bank and starts core k right after it, so that section k+1 is
// transferred while core k decompresses. Each section is 1024 symbols, which
// fills a core's decompressed memory. Midway the host also tries to
// overwrite the compressed memory of a running core, which must be refused.
// The host polls the status register until every core is done and reads back
// all 4 x 1024 samples, checking each against symbol * K + Minimum.
//
// Mechanisms counted (each must occur): dictionary loads by the cores,
// transfers overlapping decompression, several cores busy at once, refused
// PCIe writes (hardware priority), bit-buffer refills during decoding, and
// core starts. Each core's busy time is checked against the decoder's clock
// formula.
module tb_pcie_decompressor_top;
  import pcie_decomp_pkg::*;
  import tb_huff_pkg::*;
  localparam int NC = 4, NSYM = 1024;
  logic clk = 0, rst_n = 0;
  logic b_wr_en = 0, a_rd_en = 0, blocked;
  logic [11:0] b_wr_a = '0, a_rd_a = '0;
  logic [31:0] b_wr_d = '0, a_rd_d;
  logic [NC-1:0] busy, done, err;
  int checks = 0, failures = 0;
  int idx [NC][$];
  logic [31:0] words [$];
  logic [31:0] K = 32'h0000_0140, MINV = 32'hFFFF_F800;  // 1.25 and -8.0 in 24.8 fixed point
  // mechanism counters
  int n_dict_reads = 0, n_overlap = 0, n_parallel = 0, max_parallel = 0, n_blocked = 0;
  int n_refill = 0, n_starts = 0;
  int busy_cycles [NC];
  int comp_reads [NC];

  pcie_decompressor_top dut (
    .clk, .rst_n, .b_wr_en_i(b_wr_en), .b_wr_a_i(b_wr_a), .b_wr_d_i(b_wr_d),
    .a_rd_en_i(a_rd_en), .a_rd_a_i(a_rd_a), .a_rd_d_o(a_rd_d), .pcie_wr_blocked_o(blocked),
    .core_busy_o(busy), .core_done_o(done), .core_error_o(err));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (|dut.dict_rd_en) n_dict_reads++;
    if (b_wr_en && |busy) n_overlap++;
    if ($countones(busy) >= 2) n_parallel++;
    if ($countones(busy) > max_parallel) max_parallel = $countones(busy);
    if (blocked) n_blocked++;
    n_starts += $countones(dut.start);
    for (int k = 0; k < NC; k++) begin
      if (busy[k]) busy_cycles[k]++;
      if (dut.comp_rd_en[k]) comp_reads[k]++;
    end
  end

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(input int region, a, input logic [31:0] d);
    @(negedge clk); b_wr_en = 1; b_wr_a = {2'(region), 10'(a)}; b_wr_d = d;
    @(negedge clk); b_wr_en = 0;
  endtask

  task automatic rd(input int region, a, output logic [31:0] d);
    @(negedge clk); a_rd_en = 1; a_rd_a = {2'(region), 10'(a)};
    @(negedge clk); a_rd_en = 0; d = a_rd_d;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int polls;
    for (int k = 0; k < NC; k++) begin
      busy_cycles[k] = 0; comp_reads[k] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // parameters
    wr(0, REG_DICT_SIZE, NS);
    wr(0, REG_K, K);
    wr(0, REG_MIN, MINV);
    for (int k = 0; k < NC; k++) wr(0, REG_NSYM0 + k, NSYM);
    // the dictionary into every memory of bank 1
    for (int k = 0; k < NC; k++) begin
      wr(0, REG_SEL_MEM, k);
      for (int i = 0; i < NS; i++) wr(REGION_DICT, i, dict_word(i));
    end
    // compressed sections, each followed by the start of its core
    for (int k = 0; k < NC; k++) begin
      for (int s = 0; s < NSYM; s++) idx[k].push_back(pick_index());
      void'(encode(idx[k], words));
      wr(0, REG_SEL_MEM, k);
      foreach (words[w]) wr(REGION_COMP, w, words[w]);
      wr(0, REG_CTRL, (1 << (k + 1)) - 1);
      if (k == 1) begin
        // core 0 is running: its compressed memory must not change
        wr(0, REG_SEL_MEM, 0);
        wr(REGION_COMP, 0, 32'hFFFF_FFFF);
      end
    end
    // poll the status register
    polls = 0;
    do begin
      repeat (50) @(negedge clk);
      rd(REGION_REGS, REG_STATUS, d);
      polls++;
    end while (d[7:4] != 4'hF && polls < 2000);
    check(d[7:4], 4'hF, "all cores done");
    check(d[11:8], 0, "no core reported an error");
    check(d[3:0], 0, "no core busy");
    // read back every sample
    for (int k = 0; k < NC; k++) begin
      wr(0, REG_SEL_MEM, k);
      for (int s = 0; s < NSYM; s++) begin
        rd(REGION_DEC, s, d);
        check(d, 32'(sym_of(idx[k][s]) * K + MINV), $sformatf("core %0d sample %0d", k, s));
      end
      check(busy_cycles[k], expected_cycles(idx[k], NS), $sformatf("core %0d busy clocks", k));
      n_refill += comp_reads[k] - 2;
    end
    $display("mechanisms: dictionary-load clocks %0d, overlapped writes %0d, parallel clocks %0d (max %0d busy), refused writes %0d, refills %0d, starts %0d",
             n_dict_reads, n_overlap, n_parallel, max_parallel, n_blocked, n_refill, n_starts);
    check(n_dict_reads, NC * NS, "dictionary words loaded by cores");
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL transfer never overlapped decompression"); end
    checks++; if (n_parallel == 0) begin failures++; $display("FAIL cores never ran in parallel"); end
    checks++; if (n_blocked == 0) begin failures++; $display("FAIL hardware priority never exercised"); end
    checks++; if (n_refill <= 0) begin failures++; $display("FAIL no refill during decoding"); end
    check(n_starts, NC, "core starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
