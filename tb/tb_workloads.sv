// tb_workloads: runs the whole design on six synthetic data sets whose
// compression ratios are those of the seismic data sets the design was
// evaluated with (11.84, 12.86, 16.82, 18.04, 22.31, 24.37, relative to
// 32-bit samples). The real traces are not available, so each data set is
// 4096 quantized samples (one full load: 4 cores x 1024) whose quantization
// indices follow a geometric distribution around the middle level 128, rank
// r having count ~ 4096 * (1-q) * q^r. The ratio q is found by bisection so
// that the Huffman-coded size gives the target ratio within 3 %. The
// Huffman code is built in the testbench (repeatedly merge the two lightest
// nodes; if a code would exceed 16 bits, every count is raised by one and the
// code rebuilt), then made canonical, shortest codes first.
//
// Each data set is sent as the design's schedule prescribes (dictionary to
// all four memories, then section k followed by the start of core k), every
// sample is read back and checked against index * K + Minimum, and the time
// from the first compressed word to the last core done is reported next to
// the time the host would need to write the 4096 raw samples at the same
// rate of one word per two clocks. Those clock counts describe this
// testbench's host model, not a real PCIe link.
module tb_workloads;
  import pcie_decomp_pkg::*;
  localparam int NC = 4, NSYM = 1024, NTOT = NC * NSYM, NR = 255;
  localparam real TARGET_CR [6] = '{11.84, 12.86, 16.82, 18.04, 22.31, 24.37};
  logic clk = 0, rst_n = 0;
  logic b_wr_en = 0, a_rd_en = 0, blocked;
  logic [11:0] b_wr_a = '0, a_rd_a = '0;
  logic [31:0] b_wr_d = '0, a_rd_d;
  logic [NC-1:0] busy, done, err;
  int checks = 0, failures = 0;
  int n_overlap = 0;

  // current code
  int cnt [NR];
  int len [NR];
  int ent_of [NR];          // rank -> dictionary entry
  int rank_of [NR];         // dictionary entry -> rank
  logic [15:0] code [NR];   // right-aligned code per rank
  int nent;
  int samples [NTOT];       // ranks
  logic [31:0] words [$];

  pcie_decompressor_top dut (
    .clk, .rst_n, .b_wr_en_i(b_wr_en), .b_wr_a_i(b_wr_a), .b_wr_d_i(b_wr_d),
    .a_rd_en_i(a_rd_en), .a_rd_a_i(a_rd_a), .a_rd_d_o(a_rd_d), .pcie_wr_blocked_o(blocked),
    .core_busy_o(busy), .core_done_o(done), .core_error_o(err));

  always #5 clk = ~clk;
  always @(posedge clk) if (b_wr_en && |busy) n_overlap++;

  function automatic logic [7:0] sym_of_rank(int r);
    return (r % 2 == 1) ? 8'(128 + (r + 1) / 2) : 8'(128 - r / 2);
  endfunction

  // Huffman code lengths of the counts in cnt[] (0 = symbol absent)
  function automatic int build_lengths();
    longint w [2*NR];
    int parent [2*NR];
    bit alive [2*NR];
    int nodes = NR, nalive = 0, maxlen = 0;
    for (int i = 0; i < 2*NR; i++) begin
      w[i] = 0; parent[i] = -1; alive[i] = 0;
    end
    for (int i = 0; i < NR; i++) begin
      w[i] = cnt[i]; alive[i] = (cnt[i] > 0);
      if (alive[i]) nalive++;
    end
    while (nalive > 1) begin
      int a = -1, b = -1;
      for (int i = 0; i < nodes; i++) if (alive[i]) begin
        if (a < 0 || w[i] < w[a]) begin b = a; a = i; end
        else if (b < 0 || w[i] < w[b]) b = i;
      end
      w[nodes] = w[a] + w[b]; alive[nodes] = 1;
      parent[a] = nodes; parent[b] = nodes; alive[a] = 0; alive[b] = 0;
      nodes++; nalive--;
    end
    for (int i = 0; i < NR; i++) begin
      len[i] = 0;
      if (cnt[i] > 0) begin
        int j = i;
        while (parent[j] >= 0) begin len[i]++; j = parent[j]; end
        if (len[i] == 0) len[i] = 1;
        if (len[i] > maxlen) maxlen = len[i];
      end
    end
    return maxlen;
  endfunction

  // counts for ratio q, code lengths (at most 16) and compressed bits
  function automatic longint make_code(real q);
    int total = 0;
    longint bits = 0;
    for (int r = 0; r < NR; r++) begin
      cnt[r] = int'($floor(real'(NTOT) * (1.0 - q) * (q ** r)));
      total += cnt[r];
    end
    cnt[0] += NTOT - total;
    while (build_lengths() > MAX_LEN)
      for (int r = 0; r < NR; r++) if (cnt[r] > 0) cnt[r]++;
    for (int r = 0; r < NR; r++) bits += longint'(cnt[r]) * len[r];
    return bits;
  endfunction

  // canonical codes, entries ordered by (length, rank)
  function automatic void make_canonical();
    int c = 0, prev = 0;
    nent = 0;
    for (int l = 1; l <= MAX_LEN; l++)
      for (int r = 0; r < NR; r++)
        if (cnt[r] > 0 && len[r] == l) begin
          if (nent > 0) c = (c + 1) << (l - prev);
          prev = l;
          code[r] = 16'(c);
          ent_of[r] = nent; rank_of[nent] = r;
          nent++;
        end
  endfunction

  function automatic logic [31:0] dict_word(int e);
    int r = rank_of[e];
    logic [15:0] left = code[r] << (16 - len[r]);
    return {left, 5'(len[r]), 3'b000, sym_of_rank(r)};
  endfunction

  task automatic check(input longint got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, K, MINV;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (TARGET_CR[ds]) begin
      automatic real lo = 0.001, hi = 0.95;
      real q, cr;
      longint bits;
      int t_start, t_end, t_raw, now, ncomp;
      // bisection: the ratio falls as q grows
      for (int it = 0; it < 40; it++) begin
        q = (lo + hi) / 2.0;
        bits = make_code(q);
        cr = 32.0 * NTOT / real'(bits);
        if (cr > TARGET_CR[ds]) lo = q; else hi = q;
      end
      make_canonical();
      checks++;
      if (cr < TARGET_CR[ds] * 0.97 || cr > TARGET_CR[ds] * 1.03) begin
        failures++;
        $display("FAIL data set %0d: ratio %f not near %f", ds, cr, TARGET_CR[ds]);
      end
      // samples: counts per rank, shuffled
      begin
        automatic int n = 0;
        for (int r = 0; r < NR; r++) repeat (cnt[r]) samples[n++] = r;
        for (int i = NTOT - 1; i > 0; i--) begin
          automatic int j = $urandom_range(0, i);
          automatic int t = samples[i];
          samples[i] = samples[j]; samples[j] = t;
        end
      end
      K = $urandom & 32'h0000_FFFF; MINV = $urandom;
      wr(0, REG_CTRL, 0);
      wr(0, REG_DICT_SIZE, nent);
      wr(0, REG_K, K);
      wr(0, REG_MIN, MINV);
      for (int k = 0; k < NC; k++) wr(0, REG_NSYM0 + k, NSYM);
      for (int k = 0; k < NC; k++) begin
        wr(0, REG_SEL_MEM, k);
        for (int e = 0; e < nent; e++) wr(REGION_DICT, e, dict_word(e));
      end
      t_start = int'($time / 10);
      ncomp = 0;
      for (int k = 0; k < NC; k++) begin
        automatic int unsigned pos = 0;
        words.delete();
        for (int s = 0; s < NSYM; s++) begin
          automatic int r = samples[k * NSYM + s];
          for (int b = len[r] - 1; b >= 0; b--) begin
            if (pos % 32 == 0) words.push_back(32'h0);
            words[pos / 32][31 - (pos % 32)] = code[r][b];
            pos++;
          end
        end
        ncomp += words.size();
        wr(0, REG_SEL_MEM, k);
        foreach (words[w]) wr(REGION_COMP, w, words[w]);
        wr(0, REG_CTRL, (1 << (k + 1)) - 1);
      end
      while (done != 4'hF) @(negedge clk);
      t_end = int'($time / 10);
      check(err, 0, "no decoding error");
      t_raw = 2 * NTOT;
      for (int k = 0; k < NC; k++) begin
        wr(0, REG_SEL_MEM, k);
        for (int s = 0; s < NSYM; s++) begin
          rd(REGION_DEC, s, d);
          check(d, 32'(sym_of_rank(samples[k * NSYM + s]) * K + MINV), $sformatf("set %0d core %0d sample %0d", ds, k, s));
        end
      end
      $display("data set %0d: target CR %5.2f, built CR %5.2f, %0d dictionary entries, %0d compressed words; compressed transfer + decompression %0d clocks, raw transfer %0d clocks",
               ds, TARGET_CR[ds], cr, nent, ncomp, t_end - t_start, t_raw);
    end
    checks++;
    if (n_overlap == 0) begin failures++; $display("FAIL no transfer overlapped decompression"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
