// pcie_decomp_pkg: constants and types shared by the PCIe decompression design.
//
// The sizes follow the design: 32-bit words, memories of 1024 words, four
// memories per bank, four decompression cores and a bank of 32 registers.
// The register map, the PCIe address regions and the layout of a dictionary
// word are this design's own choices; they are collected here so that the
// host software and the RTL can agree on them in one place.
package pcie_decomp_pkg;

  localparam int unsigned DATA_W    = 32;    // word width of registers and memories
  localparam int unsigned MEM_DEPTH = 1024;  // words per block RAM
  localparam int unsigned MEM_AW    = $clog2(MEM_DEPTH);
  localparam int unsigned N_MEM     = 4;     // memories per bank = number of cores
  localparam int unsigned N_CORES   = N_MEM;
  localparam int unsigned N_REGS    = 32;    // register bank size

  // PCIe word address = {region[1:0], word[MEM_AW-1:0]}
  typedef enum logic [1:0] {
    REGION_REGS = 2'd0,   // register bank
    REGION_DICT = 2'd1,   // memory bank 1: Huffman dictionary
    REGION_COMP = 2'd2,   // memory bank 2: compressed data
    REGION_DEC  = 2'd3    // memory bank 3: decompressed data
  } region_e;

  // Huffman code parameters
  localparam int unsigned SYM_W      = 8;             // quantized symbol width
  localparam int unsigned MAX_LEN    = 16;            // longest code word
  localparam int unsigned LEN_W      = 5;             // holds 1..MAX_LEN
  localparam int unsigned DICT_DEPTH = 1 << SYM_W;    // one entry per symbol value
  localparam int unsigned DICT_AW    = $clog2(DICT_DEPTH);
  localparam int unsigned NSYM_W     = MEM_AW + 1;    // up to MEM_DEPTH symbols

  // Dictionary word as stored in memory bank 1:
  //   [31:16] code, first bit in bit 31   [15:11] length   [10:8] zero   [7:0] symbol
  typedef struct packed {
    logic [MAX_LEN-1:0] code;
    logic [LEN_W-1:0]   len;
    logic [2:0]         rsvd;
    logic [SYM_W-1:0]   sym;
  } dict_word_t;

  // Control signals from the Huffman decoder's control unit to its datapath
  typedef struct packed {
    logic ag_reset, ag_enable;     // dictionary address generator
    logic dag_reset, dag_enable;   // compressed-word address generator
    logic src_reset, src_load;     // shift_register_c (dictionary word)
    logic srd_reset, srd_load;     // shift_register_d (stream buffer)
    logic srd_shift;
    logic dict_write;              // write enable of CODES and SYMBOLS
    logic code_rd_en;              // read request to the dictionary memory
    logic data_rd_en;              // read request to the compressed memory
  } huff_ctrl_t;

  // Register map (word index in region 0)
  localparam int unsigned REG_CTRL      = 0;   // [3:0] start core k on a 0->1 edge
  localparam int unsigned REG_SEL_MEM   = 1;   // [1:0] memory of a bank reached by the PCIe side
  localparam int unsigned REG_DICT_SIZE = 2;   // number of dictionary entries
  localparam int unsigned REG_K         = 3;   // inverse quantization step K
  localparam int unsigned REG_MIN       = 4;   // inverse quantization minimum
  localparam int unsigned REG_NSYM0     = 8;   // 8..11: symbols to decode by core k
  localparam int unsigned REG_STATUS    = 16;  // [3:0] busy, [7:4] done, [11:8] error (read only)

endpackage
