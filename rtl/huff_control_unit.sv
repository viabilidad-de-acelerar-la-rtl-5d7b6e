// huff_control_unit: finite state machine of the Huffman decoder.
//
// After start_i it runs three phases:
//  1. Dictionary load. For each entry i < dict_size_i: request word i of the
//     dictionary memory (LD_RD), capture it in shift_register_c (LD_CAP),
//     write it into CODES/SYMBOLS at address i (LD_WR). Three clocks per entry.
//  2. Refill. Whenever shift_register_d holds 32 bits or fewer it requests the
//     next compressed word (FILL_RD) and appends it (FILL_LD), so the buffer
//     always holds more than the longest code while searching.
//  3. Search. The dictionary is read from address 0 upward, one entry per
//     clock (SRCH0 issues the first read, SRCH compares). When the
//     comparators report that the stream starts with the entry's code, the
//     unit raises data_ready_o for that clock (the symbol is on the
//     dictionary's SYMBOLS output), shifts the code out of the buffer and
//     restarts the search. An entry found at index i costs i+2 clocks.
// After nsym_i symbols it pulses finish_o and returns to IDLE. If no entry
// matches, or the dictionary is empty, it finishes with error_o set (held
// until the next start). busy_o is high from start to finish.
// The decoder's diagram names this unit and its signals only; the states and
// their order are this design's own.
module huff_control_unit
  import pcie_decomp_pkg::huff_ctrl_t;
#(
  parameter int unsigned DICT_AW = 8,
  parameter int unsigned NSYM_W  = 11,
  parameter int unsigned LEN_W   = 5,
  parameter int unsigned CNT_W   = 7,
  parameter int unsigned WORD_W  = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  logic [DICT_AW:0]   dict_size_i,
  input  logic [NSYM_W-1:0]  nsym_i,
  input  logic [DICT_AW-1:0] dict_addr_i,   // from the address generator
  input  logic               match_i,       // from the comparators
  input  logic [LEN_W-1:0]   len_i,         // length of the entry compared
  input  logic [CNT_W-1:0]   srd_count_i,   // valid bits in shift_register_d
  output huff_ctrl_t         ctrl_o,
  output logic               data_ready_o,
  output logic               finish_o,
  output logic               busy_o,
  output logic               error_o
);
  typedef enum logic [2:0] {IDLE, LD_RD, LD_CAP, LD_WR, FILL_RD, FILL_LD, SRCH0, SRCH} state_e;
  state_e state_q, state_d;

  logic [NSYM_W-1:0]  nsym_cnt_q;
  logic [DICT_AW-1:0] cmp_idx;      // entry whose data the comparators see
  logic               last_entry, last_sym, err_d, fin_d;
  logic [CNT_W-1:0]   left_after;   // buffer bits after shifting the match out

  assign cmp_idx    = dict_addr_i - 1'b1;
  assign last_entry = ({1'b0, cmp_idx} == dict_size_i - 1'b1);
  assign last_sym   = (nsym_cnt_q + 1'b1 == nsym_i);
  assign left_after = srd_count_i - CNT_W'(len_i);

  always_comb begin
    state_d      = state_q;
    ctrl_o       = '0;
    data_ready_o = 1'b0;
    fin_d        = 1'b0;
    err_d        = 1'b0;
    unique case (state_q)
      IDLE: if (start_i) begin
        ctrl_o.ag_reset  = 1'b1;
        ctrl_o.dag_reset = 1'b1;
        ctrl_o.src_reset = 1'b1;
        ctrl_o.srd_reset = 1'b1;
        if (dict_size_i == '0) begin
          fin_d = 1'b1;
          err_d = 1'b1;
        end else if (nsym_i == '0) fin_d = 1'b1;
        else state_d = LD_RD;
      end
      LD_RD: begin
        ctrl_o.code_rd_en = 1'b1;
        state_d = LD_CAP;
      end
      LD_CAP: begin
        ctrl_o.src_load = 1'b1;
        state_d = LD_WR;
      end
      LD_WR: begin
        ctrl_o.dict_write = 1'b1;
        ctrl_o.src_reset  = 1'b1;
        if ({1'b0, dict_addr_i} == dict_size_i - 1'b1) begin
          ctrl_o.ag_reset = 1'b1;
          state_d = FILL_RD;
        end else begin
          ctrl_o.ag_enable = 1'b1;
          state_d = LD_RD;
        end
      end
      FILL_RD: begin
        ctrl_o.data_rd_en = 1'b1;
        ctrl_o.dag_enable = 1'b1;
        state_d = FILL_LD;
      end
      FILL_LD: begin
        ctrl_o.srd_load = 1'b1;
        state_d = (srd_count_i == '0) ? FILL_RD : SRCH0;
      end
      SRCH0: begin
        ctrl_o.ag_enable = 1'b1;
        state_d = SRCH;
      end
      SRCH: begin
        if (match_i) begin
          data_ready_o     = 1'b1;
          ctrl_o.srd_shift = 1'b1;
          ctrl_o.ag_reset  = 1'b1;
          if (last_sym) begin
            fin_d   = 1'b1;
            state_d = IDLE;
          end else if (32'(left_after) <= WORD_W) state_d = FILL_RD;
          else state_d = SRCH0;
        end else if (last_entry) begin
          fin_d   = 1'b1;
          err_d   = 1'b1;
          state_d = IDLE;
        end else begin
          ctrl_o.ag_enable = 1'b1;
        end
      end
      default: state_d = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= IDLE;
      nsym_cnt_q <= '0;
      finish_o   <= 1'b0;
      error_o    <= 1'b0;
    end else begin
      state_q  <= state_d;
      finish_o <= fin_d;
      if (state_q == IDLE && start_i) begin
        nsym_cnt_q <= '0;
        error_o    <= err_d;
      end else begin
        if (data_ready_o) nsym_cnt_q <= nsym_cnt_q + 1'b1;
        if (err_d)        error_o    <= 1'b1;
      end
    end
  end

  // busy until finish_o has been seen
  assign busy_o = (state_q != IDLE) || finish_o;
endmodule
