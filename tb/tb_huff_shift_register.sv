// tb_huff_shift_register: drives random loads and shifts into the 64-bit
// stream buffer and compares contents and bit count with a bit-queue model
// (first bit at the top), clock by clock.
module tb_huff_shift_register;
  localparam int IN_W = 32, BUF_W = 64;
  logic clk = 0, rst_n = 0, reset = 0, load = 0, shift = 0;
  logic [IN_W-1:0] din = '0;
  logic [6:0] shamt = '0, count;
  logic [BUF_W-1:0] q;
  bit bits[$];
  int checks = 0, failures = 0;

  huff_shift_register #(.IN_W(IN_W), .BUF_W(BUF_W)) dut (
    .clk, .rst_n, .reset_i(reset), .load_i(load), .d_in_i(din), .shift_i(shift), .shamt_i(shamt),
    .q_o(q), .count_o(count));

  always #5 clk = ~clk;

  function automatic logic [BUF_W-1:0] model_q();
    logic [BUF_W-1:0] r = '0;
    for (int i = 0; i < bits.size(); i++) r[BUF_W-1-i] = bits[i];
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      checks++;
      if (q !== model_q() || int'(count) != bits.size()) begin
        failures++;
        $display("FAIL step %0d: q=%h count=%0d expected %h/%0d", i, q, count, model_q(), bits.size());
      end
      reset = 0; load = 0; shift = 0;
      if ($urandom_range(0, 199) == 0) begin
        reset = 1;
        bits.delete();
      end else if (bits.size() <= BUF_W - IN_W && $urandom_range(0, 1)) begin
        load = 1;
        din = $urandom;
        for (int b = IN_W-1; b >= 0; b--) bits.push_back(din[b]);
      end else if (bits.size() > 0) begin
        shift = 1;
        shamt = 7'($urandom_range(1, (bits.size() < 16) ? bits.size() : 16));
        repeat (int'(shamt)) void'(bits.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
