// tb_huff_pkg: reference Huffman code and encoder shared by the testbenches.
//
// The code is a canonical prefix code over NS symbols with the lengths in
// LENS (Kraft sum below 1, longest code 16 bits, so some 16-bit patterns,
// e.g. all ones, are not code words). Codes are assigned in order of
// increasing length: code(0) = 0, code(i) = (code(i-1) + 1) << (len(i) -
// len(i-1)). Symbol values are SYM(i) = (37*i + 5) mod 256. Dictionary words
// and the packed stream follow the decoder's formats: {code[15:0] first bit
// at the top, length[4:0], 3'b0, symbol[7:0]}, and stream bits first-bit-
// first into bit 31 of consecutive 32-bit words.
package tb_huff_pkg;
  localparam int NS = 13;
  localparam int LENS [NS] = '{2, 2, 3, 3, 4, 4, 5, 5, 6, 6, 7, 8, 16};

  function automatic logic [7:0] sym_of(int i);
    return 8'((37 * i + 5) % 256);
  endfunction

  function automatic logic [15:0] code_of(int i);   // right-aligned code
    int unsigned c = 0;
    for (int j = 1; j <= i; j++) c = (c + 1) << (LENS[j] - LENS[j-1]);
    return 16'(c);
  endfunction

  function automatic logic [31:0] dict_word(int i);
    logic [15:0] left = code_of(i) << (16 - LENS[i]);
    return {left, 5'(LENS[i]), 3'b000, sym_of(i)};
  endfunction

  // geometric choice: index i with probability about 2^-(i+1)
  function automatic int pick_index();
    int i = 0;
    while (i < NS - 1 && $urandom_range(0, 1) == 1) i++;
    return i;
  endfunction

  // Packs the code words of idx[] into words[]; returns the number of words.
  function automatic int encode(input int idx [$], ref logic [31:0] words [$]);
    int unsigned pos = 0;
    words.delete();
    foreach (idx[n]) begin
      logic [15:0] c = code_of(idx[n]);
      for (int b = LENS[idx[n]] - 1; b >= 0; b--) begin
        if (pos % 32 == 0) words.push_back(32'h0);
        words[pos / 32][31 - (pos % 32)] = c[b];
        pos++;
      end
    end
    return words.size();
  endfunction

  // Decoder clocks from the start clock to finish_o for a run of idx[]
  // with a dictionary of d entries: 1 + 3d (load) + 4 (two refills) +
  // sum(i + 2) over symbols + 2 per refill while decoding (a refill happens
  // when 32 or fewer bits are left after a symbol that is not the last).
  function automatic int expected_cycles(input int idx [$], int d);
    int cyc = 1 + 3 * d + 4;
    int bits = 64;
    foreach (idx[n]) begin
      cyc += idx[n] + 2;
      bits -= LENS[idx[n]];
      if (n != idx.size() - 1 && bits <= 32) begin
        cyc += 2;
        bits += 32;
      end
    end
    return cyc;
  endfunction
endpackage
