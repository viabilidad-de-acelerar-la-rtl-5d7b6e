// communication_module: the FPGA side of the PCIe link, between the PCIe
// endpoint's read/write strobes and the decompression cores.
//
// It holds the 32 x 32 register bank and three memory banks of four
// 1024 x 32 memories: bank 1 for the Huffman dictionary, bank 2 for the
// compressed data, bank 3 for the decompressed data. A PCIe word address is
// {region[1:0], word[9:0]}: region 0 reaches the register bank (word[4:0]),
// regions 1..3 reach memory bank 1..3, where the selection register
// (REG_SEL_MEM) picks one of the four memories. Read data returns on
// a_rd_d_o one clock after a_rd_en_i. On the hardware side core k has read
// ports into memory k of banks 1 and 2 and a write port into memory k of
// bank 3; while hw_own_i[k] is high those memories are the core's and
// PCIe writes to them are dropped (pcie_wr_blocked_o flags each one).
// The address map is this design's choice; the three banks, their use and
// the selection register follow the design description.
module communication_module
  import pcie_decomp_pkg::region_e;
  import pcie_decomp_pkg::REGION_REGS;
  import pcie_decomp_pkg::REGION_DICT;
  import pcie_decomp_pkg::REGION_COMP;
  import pcie_decomp_pkg::REGION_DEC;
  import pcie_decomp_pkg::REG_SEL_MEM;
#(
  parameter int unsigned N_MEM     = 4,
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned N_REGS    = 32,
  localparam int unsigned AW       = $clog2(MEM_DEPTH),
  localparam int unsigned RAW      = $clog2(N_REGS),
  localparam int unsigned SW       = (N_MEM > 1) ? $clog2(N_MEM) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // PCIe endpoint side
  input  logic              b_wr_en_i,
  input  logic [AW+1:0]     b_wr_a_i,
  input  logic [DATA_W-1:0] b_wr_d_i,
  input  logic              a_rd_en_i,
  input  logic [AW+1:0]     a_rd_a_i,
  output logic [DATA_W-1:0] a_rd_d_o,
  output logic              pcie_wr_blocked_o,
  // register bank to and from internal logic
  output logic [DATA_W-1:0] regs_o [N_REGS],
  input  logic [N_REGS-1:0] hw_we_i,
  input  logic [DATA_W-1:0] hw_d_i [N_REGS],
  // core side
  input  logic [N_MEM-1:0]  hw_own_i,
  input  logic [N_MEM-1:0]  dict_rd_en_i,
  input  logic [AW-1:0]     dict_rd_a_i [N_MEM],
  output logic [DATA_W-1:0] dict_rd_d_o [N_MEM],
  input  logic [N_MEM-1:0]  comp_rd_en_i,
  input  logic [AW-1:0]     comp_rd_a_i [N_MEM],
  output logic [DATA_W-1:0] comp_rd_d_o [N_MEM],
  input  logic [N_MEM-1:0]  dec_wr_en_i,
  input  logic [AW-1:0]     dec_wr_a_i [N_MEM],
  input  logic [DATA_W-1:0] dec_wr_d_i [N_MEM]
);
  region_e           wr_region, rd_region, rd_region_q;
  logic [SW-1:0]     sel_mem;
  logic [DATA_W-1:0] reg_rd_d;
  logic [DATA_W-1:0] bank_rd_d [3];
  logic [2:0]        bank_blocked;
  logic [AW-1:0]     zero_a [N_MEM];
  logic [DATA_W-1:0] zero_d [N_MEM];
  logic [DATA_W-1:0] dec_hw_rd [N_MEM];   // bank 3 is never read by the cores

  assign wr_region = region_e'(b_wr_a_i[AW+1:AW]);
  assign rd_region = region_e'(a_rd_a_i[AW+1:AW]);
  assign sel_mem   = regs_o[REG_SEL_MEM][SW-1:0];

  for (genvar k = 0; k < N_MEM; k++) begin : g_zero
    assign zero_a[k] = '0;
    assign zero_d[k] = '0;
  end

  register_bank #(.N_REGS(N_REGS), .DATA_W(DATA_W)) u_regs (
    .clk, .rst_n,
    .b_wr_en_i(b_wr_en_i && wr_region == REGION_REGS), .b_wr_a_i(b_wr_a_i[RAW-1:0]), .b_wr_d_i,
    .a_rd_en_i(a_rd_en_i && rd_region == REGION_REGS), .a_rd_a_i(a_rd_a_i[RAW-1:0]), .a_rd_d_o(reg_rd_d),
    .hw_we_i, .hw_d_i, .regs_o);

  // bank 1: Huffman dictionary, read by the cores
  memory_bank #(.N_MEM(N_MEM), .DEPTH(MEM_DEPTH), .DATA_W(DATA_W)) u_bank_dict (
    .clk, .rst_n, .sel_mem_i(sel_mem), .hw_own_i,
    .b_wr_en_i(b_wr_en_i && wr_region == REGION_DICT), .b_wr_a_i(b_wr_a_i[AW-1:0]), .b_wr_d_i,
    .a_rd_en_i(a_rd_en_i && rd_region == REGION_DICT), .a_rd_a_i(a_rd_a_i[AW-1:0]), .a_rd_d_o(bank_rd_d[0]),
    .pcie_wr_blocked_o(bank_blocked[0]),
    .en_wr_huff('0), .dir_wr_huff(zero_a), .data_wr_huff(zero_d),
    .en_rd_huff(dict_rd_en_i), .dir_rd_huff(dict_rd_a_i), .data_rd_huff(dict_rd_d_o));

  // bank 2: compressed data, read by the cores
  memory_bank #(.N_MEM(N_MEM), .DEPTH(MEM_DEPTH), .DATA_W(DATA_W)) u_bank_comp (
    .clk, .rst_n, .sel_mem_i(sel_mem), .hw_own_i,
    .b_wr_en_i(b_wr_en_i && wr_region == REGION_COMP), .b_wr_a_i(b_wr_a_i[AW-1:0]), .b_wr_d_i,
    .a_rd_en_i(a_rd_en_i && rd_region == REGION_COMP), .a_rd_a_i(a_rd_a_i[AW-1:0]), .a_rd_d_o(bank_rd_d[1]),
    .pcie_wr_blocked_o(bank_blocked[1]),
    .en_wr_huff('0), .dir_wr_huff(zero_a), .data_wr_huff(zero_d),
    .en_rd_huff(comp_rd_en_i), .dir_rd_huff(comp_rd_a_i), .data_rd_huff(comp_rd_d_o));

  // bank 3: decompressed data, written by the cores, read by the host
  memory_bank #(.N_MEM(N_MEM), .DEPTH(MEM_DEPTH), .DATA_W(DATA_W)) u_bank_dec (
    .clk, .rst_n, .sel_mem_i(sel_mem), .hw_own_i,
    .b_wr_en_i(b_wr_en_i && wr_region == REGION_DEC), .b_wr_a_i(b_wr_a_i[AW-1:0]), .b_wr_d_i,
    .a_rd_en_i(a_rd_en_i && rd_region == REGION_DEC), .a_rd_a_i(a_rd_a_i[AW-1:0]), .a_rd_d_o(bank_rd_d[2]),
    .pcie_wr_blocked_o(bank_blocked[2]),
    .en_wr_huff(dec_wr_en_i), .dir_wr_huff(dec_wr_a_i), .data_wr_huff(dec_wr_d_i),
    .en_rd_huff('0), .dir_rd_huff(zero_a), .data_rd_huff(dec_hw_rd));

  always_ff @(posedge clk) begin
    if (!rst_n)         rd_region_q <= REGION_REGS;
    else if (a_rd_en_i) rd_region_q <= rd_region;
  end

  always_comb begin
    unique case (rd_region_q)
      REGION_REGS: a_rd_d_o = reg_rd_d;
      REGION_DICT: a_rd_d_o = bank_rd_d[0];
      REGION_COMP: a_rd_d_o = bank_rd_d[1];
      default:     a_rd_d_o = bank_rd_d[2];
    endcase
  end

  assign pcie_wr_blocked_o = |bank_blocked;
endmodule
