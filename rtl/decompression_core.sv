// decompression_core: one of the parallel decompression cores.
//
// A Huffman decoder feeds an inverse quantizer, whose samples are written in
// order to the core's decompressed-data memory. The core reads its own
// dictionary memory (memory k of bank 1) and compressed memory (memory k of
// bank 2) and writes memory k of bank 3; K, Minimum, the dictionary size and
// the symbol count come from the register bank.
//
// start_i (one clock) begins a run: the decoder loads the dictionary and
// decodes nsym_i symbols; sample i (= symbol_i * K + Minimum) is written to
// word i of the output memory one clock after the symbol is decoded. busy_o
// is high for the whole run including the last write; done_o and error_o
// are set at the end and held until the next start. Writing sample i to word
// i is this design's choice.
module decompression_core
#(
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned SYM_W      = 8,
  parameter int unsigned MAX_LEN    = 16,
  parameter int unsigned DICT_DEPTH = 256,
  parameter int unsigned MEM_AW     = 10,
  parameter int unsigned NSYM_W     = 11,
  localparam int unsigned DICT_AW   = $clog2(DICT_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [DICT_AW:0]  dict_size_i,
  input  logic [NSYM_W-1:0] nsym_i,
  input  logic [WORD_W-1:0] k_i,
  input  logic [WORD_W-1:0] min_i,
  output logic              dict_rd_en_o,
  output logic [MEM_AW-1:0] dict_rd_a_o,
  input  logic [WORD_W-1:0] dict_rd_d_i,
  output logic              comp_rd_en_o,
  output logic [MEM_AW-1:0] comp_rd_a_o,
  input  logic [WORD_W-1:0] comp_rd_d_i,
  output logic              dec_wr_en_o,
  output logic [MEM_AW-1:0] dec_wr_a_o,
  output logic [WORD_W-1:0] dec_wr_d_o,
  output logic              busy_o,
  output logic              done_o,
  output logic              error_o
);
  logic [SYM_W-1:0] sym;
  logic             sym_valid, finish, dec_error;

  huffman_decoder #(.WORD_W(WORD_W), .SYM_W(SYM_W), .MAX_LEN(MAX_LEN), .DICT_DEPTH(DICT_DEPTH),
                    .MEM_AW(MEM_AW), .NSYM_W(NSYM_W)) u_huff (
    .clk, .rst_n, .start_i, .dict_size_i, .nsym_i,
    .code_rd_en_o(dict_rd_en_o), .code_rd_a_o(dict_rd_a_o), .code_in_i(dict_rd_d_i),
    .data_rd_en_o(comp_rd_en_o), .data_rd_a_o(comp_rd_a_o), .data_in_i(comp_rd_d_i),
    .data_out_o(sym), .data_ready_o(sym_valid), .finish_o(finish), .busy_o, .error_o(dec_error));

  inverse_quantization #(.SYM_W(SYM_W), .DATA_W(WORD_W)) u_iq (
    .clk, .rst_n, .valid_i(sym_valid), .data_i(sym), .k_i, .min_i,
    .valid_o(dec_wr_en_o), .out_o(dec_wr_d_o));

  // output word address
  huff_address_generator #(.ADDR_W(MEM_AW)) u_out_ag (
    .clk, .rst_n, .reset_i(start_i && !busy_o), .enable_i(dec_wr_en_o), .address_o(dec_wr_a_o));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done_o  <= 1'b0;
      error_o <= 1'b0;
    end else if (start_i && !busy_o) begin
      done_o  <= 1'b0;
      error_o <= 1'b0;
    end else if (finish) begin
      done_o  <= 1'b1;
      error_o <= dec_error;
    end
  end
endmodule
