// tb_memory_bank: checks the four-memory bank from both sides.
// The PCIe side writes each memory, chosen by sel_mem, and reads it back;
// the hardware ports read and write their own memory in parallel; while a
// memory is owned by its core, PCIe writes to it are dropped (and flagged)
// and PCIe reads return zero, while the other memories stay reachable.
module tb_memory_bank;
  localparam int N = 4, D = 1024, W = 32;
  logic clk = 0, rst_n = 0;
  logic [1:0] sel = '0;
  logic [N-1:0] own = '0;
  logic b_wr_en = 0, a_rd_en = 0, blocked;
  logic [9:0] b_wr_a = '0, a_rd_a = '0;
  logic [W-1:0] b_wr_d = '0, a_rd_d;
  logic [N-1:0] en_wr = '0, en_rd = '0;
  logic [9:0] dir_wr [N];
  logic [9:0] dir_rd [N];
  logic [W-1:0] data_wr [N];
  logic [W-1:0] data_rd [N];
  logic [W-1:0] model [N][D];
  int checks = 0, failures = 0, blocked_seen = 0;

  memory_bank #(.N_MEM(N), .DEPTH(D), .DATA_W(W)) dut (
    .clk, .rst_n, .sel_mem_i(sel), .hw_own_i(own),
    .b_wr_en_i(b_wr_en), .b_wr_a_i(b_wr_a), .b_wr_d_i(b_wr_d),
    .a_rd_en_i(a_rd_en), .a_rd_a_i(a_rd_a), .a_rd_d_o(a_rd_d), .pcie_wr_blocked_o(blocked),
    .en_wr_huff(en_wr), .dir_wr_huff(dir_wr), .data_wr_huff(data_wr),
    .en_rd_huff(en_rd), .dir_rd_huff(dir_rd), .data_rd_huff(data_rd));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic pcie_write(input int m, a, input logic [W-1:0] d);
    @(negedge clk); sel = 2'(m); b_wr_en = 1; b_wr_a = 10'(a); b_wr_d = d;
    #1;
    if (blocked) blocked_seen++;
    if (!own[m]) model[m][a] = d;
    @(negedge clk); b_wr_en = 0;
  endtask

  task automatic pcie_read(input int m, a, output logic [W-1:0] d);
    @(negedge clk); sel = 2'(m); a_rd_en = 1; a_rd_a = 10'(a);
    @(negedge clk); a_rd_en = 0; d = a_rd_d;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] d;
    for (int k = 0; k < N; k++) begin
      dir_wr[k] = '0; dir_rd[k] = '0; data_wr[k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // PCIe fills the first 64 words of every memory
    for (int m = 0; m < N; m++)
      for (int a = 0; a < 64; a++) pcie_write(m, a, $urandom);
    for (int m = 0; m < N; m++)
      for (int a = 0; a < 64; a += 3) begin
        pcie_read(m, a, d);
        check(d, model[m][a], $sformatf("pcie read m%0d a%0d", m, a));
      end
    // core 2 takes its memory: hardware reads and writes it, PCIe is refused
    own = 4'b0100;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      en_rd[2] = 1; dir_rd[2] = 10'(a);
      en_wr[2] = 1; dir_wr[2] = 10'(100 + a); data_wr[2] = 32'hC0DE_0000 + 32'(a);
      model[2][100 + a] = data_wr[2];
      @(negedge clk);
      en_rd = '0; en_wr = '0;
      check(data_rd[2], model[2][a], "hardware read");
    end
    pcie_write(2, 5, 32'h0BAD_0BAD);            // dropped
    check(32'(blocked_seen), 32'd1, "write to owned memory flagged");
    pcie_read(2, 5, d);
    check(d, '0, "read of owned memory returns zero");
    pcie_write(1, 6, 32'h1111_2222);            // other memory still reachable
    pcie_read(1, 6, d);
    check(d, 32'h1111_2222, "other memory while one is owned");
    own = '0;
    pcie_read(2, 5, d);
    check(d, model[2][5], "owned memory unchanged by refused write");
    for (int a = 0; a < 16; a++) begin
      pcie_read(2, 100 + a, d);
      check(d, model[2][100 + a], "hardware write visible to PCIe");
    end
    check(32'(blocked_seen), 32'd1, "no other write flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
