// huff_dictionary: the Huffman decoder's own dictionary RAM.
//
// Two single-port synchronous RAMs at one shared address: CODES holds each
// entry's code word (first bit in the top bit) with its length, SYMBOLS the
// value it decodes to. With write_i high both are written from their d_in;
// otherwise both are read and their data outputs show the entry at addr_i
// one clock later (read-first). The split into CODES and SYMBOLS and the
// shared address follow the decoder's block diagram; the widths are this
// design's choice.
module huff_dictionary #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned CODE_W = 21,   // code + length
  parameter int unsigned SYM_W  = 8,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              write_i,
  input  logic [AW-1:0]     addr_i,
  input  logic [CODE_W-1:0] code_d_i,
  input  logic [SYM_W-1:0]  sym_d_i,
  output logic [CODE_W-1:0] code_o,
  output logic [SYM_W-1:0]  sym_o
);
  logic [CODE_W-1:0] codes   [DEPTH];
  logic [SYM_W-1:0]  symbols [DEPTH];

  always_ff @(posedge clk) begin
    if (write_i) begin
      codes[addr_i]   <= code_d_i;
      symbols[addr_i] <= sym_d_i;
    end
    code_o <= codes[addr_i];
    sym_o  <= symbols[addr_i];
  end
endmodule
