// tb_dp_ram: self-checking test of the dual-port block RAM.
// Writes random words through port A, reads them back through port B and
// checks the one-clock read latency, read-first behaviour on a same-address
// read/write, and that the read data holds while re_i is low.
module tb_dp_ram;
  localparam int DEPTH = 1024, W = 32;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] wa = '0, ra = '0;
  logic [W-1:0] wd = '0, rd;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  dp_ram #(.DEPTH(DEPTH), .DATA_W(W)) dut (.clk, .we_i(we), .wa_i(wa), .wd_i(wd), .re_i(re), .ra_i(ra), .rd_o(rd));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill the whole memory
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; wa = 10'(a); wd = $urandom; model[a] = wd;
    end
    @(negedge clk) we = 0;
    // random reads, data one clock after the request
    for (int i = 0; i < 500; i++) begin
      automatic int a = $urandom_range(0, DEPTH-1);
      @(negedge clk); re = 1; ra = 10'(a);
      @(negedge clk); re = 0;
      check(rd, model[a], $sformatf("read %0d", a));
      @(negedge clk);
      check(rd, model[a], "hold while re low");
    end
    // same address read and write: old word comes out
    @(negedge clk);
    we = 1; re = 1; wa = 10'd7; ra = 10'd7; wd = 32'hDEAD_BEEF;
    @(negedge clk);
    we = 0; re = 0;
    check(rd, model[7], "read-first");
    model[7] = 32'hDEAD_BEEF;
    @(negedge clk); re = 1; ra = 10'd7;
    @(negedge clk); re = 0;
    check(rd, model[7], "after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
