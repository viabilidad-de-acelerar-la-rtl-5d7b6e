// huff_comparators: the bank of equality comparators of the Huffman decoder.
//
// Comparator L (L = 1..MAX_LEN) checks whether the first L bits of the
// stream buffer (a_i, first bit at the top) equal the first L bits of the
// dictionary code (b_i, first bit at the top); flags_o[L-1] is its result.
// match_o is the flag for the entry's own length len_i, i.e. the stream
// starts with that code word. Because Huffman codes are prefix-free at most
// one dictionary entry can match. Purely combinational. The design shows a
// bank of equality comparators producing flags; one comparator per code
// length is this implementation's reading of it.
module huff_comparators #(
  parameter int unsigned MAX_LEN = 16,
  localparam int unsigned LEN_W  = $clog2(MAX_LEN + 1)
) (
  input  logic [MAX_LEN-1:0] a_i,
  input  logic [MAX_LEN-1:0] b_i,
  input  logic [LEN_W-1:0]   len_i,
  output logic [MAX_LEN-1:0] flags_o,
  output logic               match_o
);
  for (genvar l = 1; l <= MAX_LEN; l++) begin : g_cmp
    assign flags_o[l-1] = (a_i[MAX_LEN-1 -: l] == b_i[MAX_LEN-1 -: l]);
  end

  always_comb begin
    match_o = 1'b0;
    for (int l = 1; l <= MAX_LEN; l++)
      if (len_i == LEN_W'(l)) match_o = flags_o[l-1];
  end
endmodule
