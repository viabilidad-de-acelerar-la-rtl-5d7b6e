// tb_communication_module: checks the PCIe-facing side of the design.
// Through the PCIe strobes it writes and reads registers (region 0) and every
// memory of the three banks (regions 1..3, memory picked by REG_SEL_MEM),
// checking that each region reaches only its own storage. From the core side
// it reads banks 1 and 2 and writes bank 3, checks internal-logic register
// writes, and checks that a PCIe write into a memory owned by a core is
// refused and flagged.
module tb_communication_module;
  import pcie_decomp_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic b_wr_en = 0, a_rd_en = 0, blocked;
  logic [11:0] b_wr_a = '0, a_rd_a = '0;
  logic [31:0] b_wr_d = '0, a_rd_d;
  logic [31:0] regs [32];
  logic [31:0] hw_d [32];
  logic [31:0] hw_we = '0;
  logic [N-1:0] own = '0, dict_en = '0, comp_en = '0, dec_en = '0;
  logic [9:0] dict_a [N];
  logic [9:0] comp_a [N];
  logic [9:0] dec_a [N];
  logic [31:0] dict_d [N];
  logic [31:0] comp_d [N];
  logic [31:0] dec_d [N];
  int checks = 0, failures = 0, blocked_seen = 0;

  communication_module dut (
    .clk, .rst_n, .b_wr_en_i(b_wr_en), .b_wr_a_i(b_wr_a), .b_wr_d_i(b_wr_d),
    .a_rd_en_i(a_rd_en), .a_rd_a_i(a_rd_a), .a_rd_d_o(a_rd_d), .pcie_wr_blocked_o(blocked),
    .regs_o(regs), .hw_we_i(hw_we), .hw_d_i(hw_d), .hw_own_i(own),
    .dict_rd_en_i(dict_en), .dict_rd_a_i(dict_a), .dict_rd_d_o(dict_d),
    .comp_rd_en_i(comp_en), .comp_rd_a_i(comp_a), .comp_rd_d_o(comp_d),
    .dec_wr_en_i(dec_en), .dec_wr_a_i(dec_a), .dec_wr_d_i(dec_d));

  always #5 clk = ~clk;
  always @(posedge clk) if (blocked) blocked_seen++;

  function automatic logic [31:0] pattern(int region, int m, int a);
    return {4'(region), 4'(m), 8'hA5, 16'(a * 7 + 3)};
  endfunction

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 32; i++) hw_d[i] = '0;
    for (int k = 0; k < N; k++) begin
      dict_a[k] = '0; comp_a[k] = '0; dec_a[k] = '0; dec_d[k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // registers
    wr(0, REG_K, 32'h0000_0123);
    wr(0, REG_MIN, 32'hFFFF_FF00);
    check(regs[REG_K], 32'h123, "K register");
    rd(0, REG_MIN, d);
    check(d, 32'hFFFF_FF00, "read MIN register");
    // every memory of every bank, 8 words each
    for (int m = 0; m < N; m++) begin
      wr(0, REG_SEL_MEM, m);
      for (int r = 1; r <= 3; r++)
        for (int a = 0; a < 8; a++) wr(r, a * 100, pattern(r, m, a));
    end
    for (int m = 0; m < N; m++) begin
      wr(0, REG_SEL_MEM, m);
      for (int r = 1; r <= 3; r++)
        for (int a = 0; a < 8; a++) begin
          rd(r, a * 100, d);
          check(d, pattern(r, m, a), $sformatf("pcie read region %0d mem %0d word %0d", r, m, a * 100));
        end
    end
    // core side: read banks 1 and 2, write bank 3
    own = 4'b1111;
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      dict_en = '1; comp_en = '1; dec_en = '1;
      for (int k = 0; k < N; k++) begin
        dict_a[k] = 10'(a * 100); comp_a[k] = 10'(a * 100);
        dec_a[k] = 10'(900 + a); dec_d[k] = pattern(7, k, a);
      end
      @(negedge clk);
      dict_en = '0; comp_en = '0; dec_en = '0;
      for (int k = 0; k < N; k++) begin
        check(dict_d[k], pattern(1, k, a), "core reads dictionary bank");
        check(comp_d[k], pattern(2, k, a), "core reads compressed bank");
      end
    end
    // PCIe write into an owned memory is refused
    wr(0, REG_SEL_MEM, 2);
    wr(2, 0, 32'hBAD0_BAD0);
    check(32'(blocked_seen), 32'd1, "refused write flagged");
    own = '0;
    rd(2, 0, d);
    check(d, pattern(2, 2, 0), "owned memory kept its word");
    for (int m = 0; m < N; m++) begin
      wr(0, REG_SEL_MEM, m);
      for (int a = 0; a < 8; a++) begin
        rd(3, 900 + a, d);
        check(d, pattern(7, m, a), "core write to decompressed bank");
      end
    end
    // internal-logic register write
    @(negedge clk); hw_we[REG_STATUS] = 1'b1; hw_d[REG_STATUS] = 32'h0000_0F0F;
    @(negedge clk); hw_we = '0;
    rd(0, REG_STATUS, d);
    check(d, 32'h0F0F, "status written by internal logic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
