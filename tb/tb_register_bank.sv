// tb_register_bank: self-checking test of the 32 x 32 register bank.
// Checks PCIe writes and registered reads of every register, the parallel
// outputs to the internal logic, internal-logic writes, and that an
// internal-logic write wins over a PCIe write to the same register.
module tb_register_bank;
  localparam int N = 32, W = 32;
  logic clk = 0, rst_n = 0;
  logic b_wr_en = 0, a_rd_en = 0;
  logic [4:0] b_wr_a = '0, a_rd_a = '0;
  logic [W-1:0] b_wr_d = '0, a_rd_d;
  logic [N-1:0] hw_we = '0;
  logic [W-1:0] hw_d [N];
  logic [W-1:0] regs [N];
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  register_bank #(.N_REGS(N), .DATA_W(W)) dut (
    .clk, .rst_n, .b_wr_en_i(b_wr_en), .b_wr_a_i(b_wr_a), .b_wr_d_i(b_wr_d),
    .a_rd_en_i(a_rd_en), .a_rd_a_i(a_rd_a), .a_rd_d_o(a_rd_d),
    .hw_we_i(hw_we), .hw_d_i(hw_d), .regs_o(regs));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic pcie_read(input int r, output logic [W-1:0] d);
    @(negedge clk); a_rd_en = 1; a_rd_a = 5'(r);
    @(negedge clk); a_rd_en = 0; d = a_rd_d;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] d;
    for (int i = 0; i < N; i++) hw_d[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) check(regs[i], '0, "reset value");
    for (int i = 0; i < N; i++) begin
      @(negedge clk); b_wr_en = 1; b_wr_a = 5'(i); b_wr_d = $urandom; model[i] = b_wr_d;
    end
    @(negedge clk) b_wr_en = 0;
    for (int i = 0; i < N; i++) begin
      pcie_read(i, d);
      check(d, model[i], $sformatf("pcie read %0d", i));
      check(regs[i], model[i], $sformatf("parallel out %0d", i));
    end
    // internal logic write
    @(negedge clk); hw_we[16] = 1; hw_d[16] = 32'h0000_00F0; model[16] = 32'hF0;
    @(negedge clk); hw_we = '0;
    check(regs[16], model[16], "internal write");
    // clash: internal logic wins
    @(negedge clk);
    hw_we[3] = 1; hw_d[3] = 32'h1234_5678;
    b_wr_en = 1; b_wr_a = 5'd3; b_wr_d = 32'hAAAA_5555;
    @(negedge clk); hw_we = '0; b_wr_en = 0; model[3] = 32'h1234_5678;
    check(regs[3], model[3], "internal logic priority");
    pcie_read(3, d);
    check(d, model[3], "read after clash");
    // other registers untouched
    for (int i = 0; i < N; i++) check(regs[i], model[i], $sformatf("final %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
