// tb_huff_comparators: checks every comparator flag and the length-selected
// match against a bit-by-bit prefix comparison, for random and for
// deliberately near-equal operands.
module tb_huff_comparators;
  localparam int L = 16;
  logic [L-1:0] a, b, flags;
  logic [4:0] len;
  logic match;
  int checks = 0, failures = 0;

  huff_comparators #(.MAX_LEN(L)) dut (.a_i(a), .b_i(b), .len_i(len), .flags_o(flags), .match_o(match));

  function automatic bit prefix_eq(logic [L-1:0] x, y, int n);
    for (int i = 0; i < n; i++) if (x[L-1-i] != y[L-1-i]) return 0;
    return 1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a = 16'($urandom);
      b = a ^ (16'h1 << $urandom_range(0, L-1));   // differ in one bit
      if (t % 3 == 0) b = 16'($urandom);
      len = 5'($urandom_range(1, L));
      #1;
      for (int n = 1; n <= L; n++) begin
        checks++;
        if (flags[n-1] !== prefix_eq(a, b, n)) begin
          failures++;
          $display("FAIL flag %0d a=%h b=%h", n, a, b);
        end
      end
      checks++;
      if (match !== prefix_eq(a, b, int'(len))) begin
        failures++;
        $display("FAIL match len=%0d a=%h b=%h", len, a, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
