// register_bank: 32 x 32-bit register bank between the PCIe side and the
// internal logic.
//
// The host writes a register through the PCIe write strobe (b_wr_en_i,
// b_wr_a_i, b_wr_d_i) and reads one through the read strobe (a_rd_en_i,
// a_rd_a_i); the read word appears on a_rd_d_o one clock after a_rd_en_i,
// the same latency as the memories. Every register is also visible to the
// internal logic in parallel on regs_o, which is how the decompression cores
// get their parameters. The internal logic can write any register through
// hw_we_i/hw_d_i (used for status); on a clash with a PCIe write to the same
// register in the same cycle the internal logic wins, the same priority rule
// the memory banks follow. All registers clear on reset. The priority rule
// for registers and the reset value are this design's choices.
module register_bank #(
  parameter int unsigned N_REGS = 32,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(N_REGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // PCIe side
  input  logic              b_wr_en_i,
  input  logic [AW-1:0]     b_wr_a_i,
  input  logic [DATA_W-1:0] b_wr_d_i,
  input  logic              a_rd_en_i,
  input  logic [AW-1:0]     a_rd_a_i,
  output logic [DATA_W-1:0] a_rd_d_o,
  // internal logic side
  input  logic [N_REGS-1:0] hw_we_i,
  input  logic [DATA_W-1:0] hw_d_i [N_REGS],
  output logic [DATA_W-1:0] regs_o [N_REGS]
);
  logic [DATA_W-1:0] regs_q [N_REGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N_REGS; i++) regs_q[i] <= '0;
    end else begin
      for (int i = 0; i < N_REGS; i++) begin
        if (hw_we_i[i])
          regs_q[i] <= hw_d_i[i];
        else if (b_wr_en_i && b_wr_a_i == AW'(i))
          regs_q[i] <= b_wr_d_i;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         a_rd_d_o <= '0;
    else if (a_rd_en_i) a_rd_d_o <= regs_q[a_rd_a_i];
  end

  assign regs_o = regs_q;
endmodule
