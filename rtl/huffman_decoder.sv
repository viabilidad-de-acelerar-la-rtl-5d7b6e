// huffman_decoder: table-search Huffman decoder.
//
// Structure (after the decoder's block diagram): a control unit, an address
// generator for the dictionary, a second one for the compressed words,
// shift_register_c that takes dictionary words from CODE_IN, the dictionary
// RAM (CODES and SYMBOLS), shift_register_d that holds the head of the
// compressed stream from DATA_IN, and a bank of comparators between the
// stream head and the code read from CODES.
//
// Operation: on start_i the decoder copies dict_size_i dictionary words from
// the dictionary memory (code_rd_en_o/code_rd_a_o, word on code_in_i one
// clock later) into its own dictionary, then decodes nsym_i symbols from the
// compressed memory (data_rd_en_o/data_rd_a_o, word on data_in_i one clock
// later). Each decoded symbol appears on data_out_o while data_ready_o is
// high for one clock. finish_o pulses once at the end; error_o tells that
// the stream held a code not in the dictionary.
//
// Formats (this design's choice): a dictionary word carries the code in bits
// [31:16] with its first bit in bit 31, the code length in [15:11] and the
// symbol in [7:0]; the stream is packed first bit first into bit 31 of
// consecutive 32-bit words. CTRL_Rx of the diagram is dict_size_i/nsym_i,
// CTRL_Tx the two memory requests.
//
// Timing: 3 clocks per dictionary entry to load, then i+2 clocks for a symbol
// whose code is entry i, plus 2 clocks per 32-bit compressed word.
module huffman_decoder
  import pcie_decomp_pkg::huff_ctrl_t;
#(
  parameter int unsigned WORD_W     = 32,
  parameter int unsigned SYM_W      = 8,
  parameter int unsigned MAX_LEN    = 16,
  parameter int unsigned DICT_DEPTH = 256,
  parameter int unsigned MEM_AW     = 10,
  parameter int unsigned NSYM_W     = 11,
  localparam int unsigned DICT_AW   = $clog2(DICT_DEPTH),
  localparam int unsigned LEN_W     = $clog2(MAX_LEN + 1),
  localparam int unsigned BUF_W     = 2 * WORD_W,
  localparam int unsigned CNT_W     = $clog2(BUF_W + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  logic [DICT_AW:0]   dict_size_i,
  input  logic [NSYM_W-1:0]  nsym_i,
  // dictionary memory
  output logic               code_rd_en_o,
  output logic [MEM_AW-1:0]  code_rd_a_o,
  input  logic [WORD_W-1:0]  code_in_i,
  // compressed memory
  output logic               data_rd_en_o,
  output logic [MEM_AW-1:0]  data_rd_a_o,
  input  logic [WORD_W-1:0]  data_in_i,
  // decoded symbols
  output logic [SYM_W-1:0]   data_out_o,
  output logic               data_ready_o,
  output logic               finish_o,
  output logic               busy_o,
  output logic               error_o
);
  huff_ctrl_t          ctrl;
  logic [DICT_AW-1:0]  dict_addr;
  logic [MEM_AW-1:0]   data_addr;
  logic [WORD_W-1:0]   src_q;
  logic [CNT_W-1:0]    srd_count;
  logic [BUF_W-1:0]    srd_q;
  logic [$clog2(WORD_W+1)-1:0] src_count;
  logic [MAX_LEN+LEN_W-1:0] code_entry;
  logic [MAX_LEN-1:0]  cmp_flags;
  logic                match;

  huff_address_generator #(.ADDR_W(DICT_AW)) u_dict_ag (
    .clk, .rst_n, .reset_i(ctrl.ag_reset), .enable_i(ctrl.ag_enable), .address_o(dict_addr));

  huff_address_generator #(.ADDR_W(MEM_AW)) u_data_ag (
    .clk, .rst_n, .reset_i(ctrl.dag_reset), .enable_i(ctrl.dag_enable), .address_o(data_addr));

  // shift_register_c: captures one dictionary word
  huff_shift_register #(.IN_W(WORD_W), .BUF_W(WORD_W)) u_sr_c (
    .clk, .rst_n, .reset_i(ctrl.src_reset), .load_i(ctrl.src_load), .d_in_i(code_in_i),
    .shift_i(1'b0), .shamt_i('0), .q_o(src_q), .count_o(src_count));

  // shift_register_d: head of the compressed stream
  huff_shift_register #(.IN_W(WORD_W), .BUF_W(BUF_W)) u_sr_d (
    .clk, .rst_n, .reset_i(ctrl.srd_reset), .load_i(ctrl.srd_load), .d_in_i(data_in_i),
    .shift_i(ctrl.srd_shift), .shamt_i(CNT_W'(code_entry[LEN_W-1:0])), .q_o(srd_q), .count_o(srd_count));

  // CODES holds {code, length}; SYMBOLS holds the symbol
  huff_dictionary #(.DEPTH(DICT_DEPTH), .CODE_W(MAX_LEN + LEN_W), .SYM_W(SYM_W)) u_dict (
    .clk, .write_i(ctrl.dict_write), .addr_i(dict_addr),
    .code_d_i(src_q[WORD_W-1 -: MAX_LEN + LEN_W]), .sym_d_i(src_q[SYM_W-1:0]),
    .code_o(code_entry), .sym_o(data_out_o));

  huff_comparators #(.MAX_LEN(MAX_LEN)) u_cmp (
    .a_i(srd_q[BUF_W-1 -: MAX_LEN]), .b_i(code_entry[MAX_LEN+LEN_W-1 -: MAX_LEN]),
    .len_i(code_entry[LEN_W-1:0]), .flags_o(cmp_flags), .match_o(match));

  huff_control_unit #(.DICT_AW(DICT_AW), .NSYM_W(NSYM_W), .LEN_W(LEN_W), .CNT_W(CNT_W),
                      .WORD_W(WORD_W)) u_cu (
    .clk, .rst_n, .start_i, .dict_size_i, .nsym_i, .dict_addr_i(dict_addr), .match_i(match),
    .len_i(code_entry[LEN_W-1:0]), .srd_count_i(srd_count), .ctrl_o(ctrl),
    .data_ready_o, .finish_o, .busy_o, .error_o);

  assign code_rd_en_o = ctrl.code_rd_en;
  assign code_rd_a_o  = MEM_AW'(dict_addr);
  assign data_rd_en_o = ctrl.data_rd_en;
  assign data_rd_a_o  = data_addr;
endmodule
