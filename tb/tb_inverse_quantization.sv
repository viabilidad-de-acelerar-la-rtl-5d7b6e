// tb_inverse_quantization: streams random symbols, one per clock with gaps,
// and checks out = symbol*K + Minimum (32-bit two's complement) exactly one
// clock after each input, plus valid_o timing.
module tb_inverse_quantization;
  logic clk = 0, rst_n = 0, vin = 0, vout;
  logic [7:0] d = '0;
  logic [31:0] k = '0, mn = '0, out;
  int checks = 0, failures = 0;
  logic        exp_v;
  logic [31:0] exp_o;

  inverse_quantization #(.SYM_W(8), .DATA_W(32)) dut (
    .clk, .rst_n, .valid_i(vin), .data_i(d), .k_i(k), .min_i(mn), .valid_o(vout), .out_o(out));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k = 32'h0000_0180;          // step 1.5 in 24.8 fixed point
    mn = 32'hFFFF_C000;         // minimum -64.0
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_v = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // check what the previous input produced
      checks++;
      if (vout !== exp_v) begin
        failures++;
        $display("FAIL valid at %0d", i);
      end
      if (exp_v) begin
        checks++;
        if (out !== exp_o) begin
          failures++;
          $display("FAIL out %h expected %h", out, exp_o);
        end
      end
      vin = ($urandom_range(0, 3) != 0);
      d = 8'($urandom);
      if (i % 500 == 499) begin
        k = $urandom; mn = $urandom;
      end
      exp_v = vin;
      exp_o = 32'(longint'(d) * longint'(k)) + mn;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
