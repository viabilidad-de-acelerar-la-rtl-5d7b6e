// tb_huff_dictionary: fills CODES and SYMBOLS with random entries, reads
// them back at random addresses (one clock latency) and checks read-first
// behaviour when an entry is overwritten.
module tb_huff_dictionary;
  localparam int D = 256, CW = 21, SW = 8;
  logic clk = 0, we = 0;
  logic [7:0] addr = '0;
  logic [CW-1:0] cd = '0, co;
  logic [SW-1:0] sd = '0, so;
  logic [CW-1:0] mc [D];
  logic [SW-1:0] ms [D];
  int checks = 0, failures = 0;

  huff_dictionary #(.DEPTH(D), .CODE_W(CW), .SYM_W(SW)) dut (
    .clk, .write_i(we), .addr_i(addr), .code_d_i(cd), .sym_d_i(sd), .code_o(co), .sym_o(so));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; addr = 8'(a); cd = CW'($urandom); sd = SW'($urandom);
      mc[a] = cd; ms[a] = sd;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 1000; i++) begin
      automatic int a = $urandom_range(0, D-1);
      addr = 8'(a);
      @(negedge clk);
      check(32'(co), 32'(mc[a]), "code");
      check(32'(so), 32'(ms[a]), "symbol");
    end
    // overwrite: the write cycle shows the old entry
    we = 1; addr = 8'd5; cd = ~mc[5]; sd = ~ms[5];
    @(negedge clk);
    we = 0;
    check(32'(co), 32'(mc[5]), "read-first code");
    mc[5] = ~mc[5]; ms[5] = ~ms[5];
    @(negedge clk);
    check(32'(co), 32'(mc[5]), "new code");
    check(32'(so), 32'(ms[5]), "new symbol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
