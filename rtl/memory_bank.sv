// memory_bank: four 1024 x 32 dual-port memories behind one set of PCIe
// strobes, each also reachable by its own decompression core.
//
// The PCIe side (b_wr_* to write, a_rd_* to read) is shared by the four
// memories; sel_mem_i, taken from the register bank, chooses which memory
// it reaches. Each memory k also has a hardware write port (en_wr_huff[k],
// dir_wr_huff[k], data_wr_huff[k]) and a hardware read port (en_rd_huff[k],
// dir_rd_huff[k] -> data_rd_huff[k]) for core k. Port A of each RAM is
// driven by the writing access logic and port B by the reading access logic.
//
// Hardware has priority: while hw_own_i[k] is high (core k is busy) the
// memory belongs to core k, a PCIe write to it is dropped and flagged on
// pcie_wr_blocked_o, and a PCIe read of it returns zero. This keeps a
// memory from being changed while it is being decompressed. Read data on
// either side comes one clock after the request. Holding the priority for
// the whole busy period, rather than cycle by cycle, is this design's
// reading of the rule.
module memory_bank #(
  parameter int unsigned N_MEM  = 4,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned SW    = (N_MEM > 1) ? $clog2(N_MEM) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SW-1:0]     sel_mem_i,
  input  logic [N_MEM-1:0]  hw_own_i,
  // PCIe side
  input  logic              b_wr_en_i,
  input  logic [AW-1:0]     b_wr_a_i,
  input  logic [DATA_W-1:0] b_wr_d_i,
  input  logic              a_rd_en_i,
  input  logic [AW-1:0]     a_rd_a_i,
  output logic [DATA_W-1:0] a_rd_d_o,
  output logic              pcie_wr_blocked_o,
  // hardware side, one port pair per memory
  input  logic [N_MEM-1:0]  en_wr_huff,
  input  logic [AW-1:0]     dir_wr_huff  [N_MEM],
  input  logic [DATA_W-1:0] data_wr_huff [N_MEM],
  input  logic [N_MEM-1:0]  en_rd_huff,
  input  logic [AW-1:0]     dir_rd_huff  [N_MEM],
  output logic [DATA_W-1:0] data_rd_huff [N_MEM]
);
  logic [N_MEM-1:0]  we, re;
  logic [AW-1:0]     wa [N_MEM];
  logic [AW-1:0]     ra [N_MEM];
  logic [DATA_W-1:0] wd [N_MEM];
  logic [DATA_W-1:0] rd [N_MEM];

  // writing access logic (port A) and reading access logic (port B)
  always_comb begin
    for (int k = 0; k < N_MEM; k++) begin
      if (hw_own_i[k]) begin
        we[k] = en_wr_huff[k];
        wa[k] = dir_wr_huff[k];
        wd[k] = data_wr_huff[k];
        re[k] = en_rd_huff[k];
        ra[k] = dir_rd_huff[k];
      end else begin
        we[k] = b_wr_en_i && (sel_mem_i == SW'(k));
        wa[k] = b_wr_a_i;
        wd[k] = b_wr_d_i;
        re[k] = a_rd_en_i && (sel_mem_i == SW'(k));
        ra[k] = a_rd_a_i;
      end
    end
  end

  for (genvar k = 0; k < N_MEM; k++) begin : g_mem
    dp_ram #(.DEPTH(DEPTH), .DATA_W(DATA_W)) u_ram (
      .clk, .we_i(we[k]), .wa_i(wa[k]), .wd_i(wd[k]),
      .re_i(re[k]), .ra_i(ra[k]), .rd_o(rd[k])
    );
  end

  assign data_rd_huff = rd;

  // PCIe read return: remember which memory answered and whether it was ours
  logic [SW-1:0] rd_sel_q;
  logic          rd_blocked_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_sel_q     <= '0;
      rd_blocked_q <= 1'b0;
    end else if (a_rd_en_i) begin
      rd_sel_q     <= sel_mem_i;
      rd_blocked_q <= hw_own_i[sel_mem_i];
    end
  end
  assign a_rd_d_o = rd_blocked_q ? '0 : rd[rd_sel_q];

  assign pcie_wr_blocked_o = b_wr_en_i && hw_own_i[sel_mem_i];
endmodule
