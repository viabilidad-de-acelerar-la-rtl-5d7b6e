// pcie_decompressor_top: FPGA side of a CPU-to-FPGA link that moves seismic
// data compressed (uniform quantization + Huffman coding) and expands it on
// the FPGA with four decompression cores working in parallel.
//
// The host writes, over PCIe, the Huffman dictionary into every memory of
// bank 1, one section of compressed data into memory k of bank 2, and the
// parameters into the register bank; setting bit k of REG_CTRL (a 0->1
// change) starts core k, which writes its decompressed samples into memory
// k of bank 3 for the host to read back. While core k runs it owns memory k
// of every bank, so the host can keep writing the next section into another
// memory: transfer of section k+1 overlaps decompression of section k.
// Status (busy, done, error per core) is written by the hardware into
// REG_STATUS every clock.
//
// Ports are the PCIe endpoint's strobes: b_wr_en_i/b_wr_a_i/b_wr_d_i write
// one 32-bit word, a_rd_en_i/a_rd_a_i read one, with the data on a_rd_d_o
// one clock later. Address = {region[1:0], word[9:0]}: region 0 registers,
// 1 dictionary bank, 2 compressed bank, 3 decompressed bank; the memory
// within a bank is the one named in REG_SEL_MEM. The address map, register
// map and start-on-edge rule are this design's choices (see pcie_decomp_pkg).
module pcie_decompressor_top
  import pcie_decomp_pkg::SYM_W;
  import pcie_decomp_pkg::MAX_LEN;
  import pcie_decomp_pkg::DICT_DEPTH;
  import pcie_decomp_pkg::DICT_AW;
  import pcie_decomp_pkg::REG_CTRL;
  import pcie_decomp_pkg::REG_DICT_SIZE;
  import pcie_decomp_pkg::REG_K;
  import pcie_decomp_pkg::REG_MIN;
  import pcie_decomp_pkg::REG_NSYM0;
  import pcie_decomp_pkg::REG_STATUS;
#(
  parameter int unsigned N_CORES   = 4,
  parameter int unsigned MEM_DEPTH = 1024,
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned N_REGS    = 32,
  localparam int unsigned AW       = $clog2(MEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               b_wr_en_i,
  input  logic [AW+1:0]      b_wr_a_i,
  input  logic [DATA_W-1:0]  b_wr_d_i,
  input  logic               a_rd_en_i,
  input  logic [AW+1:0]      a_rd_a_i,
  output logic [DATA_W-1:0]  a_rd_d_o,
  output logic               pcie_wr_blocked_o,
  output logic [N_CORES-1:0] core_busy_o,
  output logic [N_CORES-1:0] core_done_o,
  output logic [N_CORES-1:0] core_error_o
);
  logic [DATA_W-1:0]  regs [N_REGS];
  logic [N_REGS-1:0]  hw_we;
  logic [DATA_W-1:0]  hw_d [N_REGS];
  logic [N_CORES-1:0] start, ctrl_q;

  logic [N_CORES-1:0] dict_rd_en, comp_rd_en, dec_wr_en;
  logic [AW-1:0]      dict_rd_a [N_CORES];
  logic [AW-1:0]      comp_rd_a [N_CORES];
  logic [AW-1:0]      dec_wr_a  [N_CORES];
  logic [DATA_W-1:0]  dict_rd_d [N_CORES];
  logic [DATA_W-1:0]  comp_rd_d [N_CORES];
  logic [DATA_W-1:0]  dec_wr_d  [N_CORES];

  communication_module #(.N_MEM(N_CORES), .MEM_DEPTH(MEM_DEPTH), .DATA_W(DATA_W), .N_REGS(N_REGS)) u_comm (
    .clk, .rst_n, .b_wr_en_i, .b_wr_a_i, .b_wr_d_i, .a_rd_en_i, .a_rd_a_i, .a_rd_d_o,
    .pcie_wr_blocked_o, .regs_o(regs), .hw_we_i(hw_we), .hw_d_i(hw_d),
    .hw_own_i(core_busy_o),
    .dict_rd_en_i(dict_rd_en), .dict_rd_a_i(dict_rd_a), .dict_rd_d_o(dict_rd_d),
    .comp_rd_en_i(comp_rd_en), .comp_rd_a_i(comp_rd_a), .comp_rd_d_o(comp_rd_d),
    .dec_wr_en_i(dec_wr_en), .dec_wr_a_i(dec_wr_a), .dec_wr_d_i(dec_wr_d));

  // start core k on a 0->1 change of REG_CTRL[k]
  always_ff @(posedge clk) begin
    if (!rst_n) ctrl_q <= '0;
    else        ctrl_q <= regs[REG_CTRL][N_CORES-1:0];
  end
  assign start = regs[REG_CTRL][N_CORES-1:0] & ~ctrl_q;

  for (genvar k = 0; k < N_CORES; k++) begin : g_core
    decompression_core #(.WORD_W(DATA_W), .SYM_W(SYM_W), .MAX_LEN(MAX_LEN), .DICT_DEPTH(DICT_DEPTH),
                         .MEM_AW(AW), .NSYM_W(AW + 1)) u_core (
      .clk, .rst_n, .start_i(start[k]),
      .dict_size_i(regs[REG_DICT_SIZE][DICT_AW:0]),
      .nsym_i(regs[REG_NSYM0 + k][AW:0]),
      .k_i(regs[REG_K]), .min_i(regs[REG_MIN]),
      .dict_rd_en_o(dict_rd_en[k]), .dict_rd_a_o(dict_rd_a[k]), .dict_rd_d_i(dict_rd_d[k]),
      .comp_rd_en_o(comp_rd_en[k]), .comp_rd_a_o(comp_rd_a[k]), .comp_rd_d_i(comp_rd_d[k]),
      .dec_wr_en_o(dec_wr_en[k]), .dec_wr_a_o(dec_wr_a[k]), .dec_wr_d_o(dec_wr_d[k]),
      .busy_o(core_busy_o[k]), .done_o(core_done_o[k]), .error_o(core_error_o[k]));
  end

  // hardware-written status register
  always_comb begin
    for (int r = 0; r < N_REGS; r++) begin
      hw_we[r] = (r == REG_STATUS);
      hw_d[r]  = '0;
    end
    hw_d[REG_STATUS] = DATA_W'({core_error_o, core_done_o, core_busy_o});
  end
endmodule
