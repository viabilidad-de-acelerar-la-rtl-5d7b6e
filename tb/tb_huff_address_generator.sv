// tb_huff_address_generator: checks counting, hold, reset and reset priority
// of the decoder's address counter against a software count, including the
// wrap at 2^ADDR_W.
module tb_huff_address_generator;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0, reset = 0, enable = 0;
  logic [AW-1:0] addr;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  huff_address_generator #(.ADDR_W(AW)) dut (.clk, .rst_n, .reset_i(reset), .enable_i(enable), .address_o(addr));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (addr !== AW'(model)) begin
        failures++;
        $display("FAIL cycle %0d: got %0d expected %0d", i, addr, AW'(model));
      end
      reset  = ($urandom_range(0, 99) < 2);
      enable = ($urandom_range(0, 99) < 80);
      if (reset) model = 0;
      else if (enable) model = (model + 1) % (1 << AW);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
