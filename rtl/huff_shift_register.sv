// huff_shift_register: bit buffer of the Huffman decoder.
//
// Holds up to BUF_W bits, first bit at the top (bit BUF_W-1), with count_o
// telling how many are valid. load_i appends the IN_W-bit word d_in_i right
// below the valid bits; it may only be used while count_o <= BUF_W-IN_W.
// shift_i drops the leading shamt_i bits (a decoded code word) and moves the
// rest up. reset_i empties the buffer. All take effect on the clock edge;
// load and shift in one cycle are not allowed (assertion).
// As shift_register_d it is the 64-bit stream buffer whose head feeds the
// comparators; as shift_register_c (BUF_W = IN_W) it captures one dictionary
// word. Sizes are this design's choice.
module huff_shift_register #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned BUF_W = 64,
  localparam int unsigned CW   = $clog2(BUF_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reset_i,
  input  logic             load_i,
  input  logic [IN_W-1:0]  d_in_i,
  input  logic             shift_i,
  input  logic [CW-1:0]    shamt_i,
  output logic [BUF_W-1:0] q_o,
  output logic [CW-1:0]    count_o
);
  logic [BUF_W-1:0] placed;
  // word aligned to the top, then moved down past the valid bits
  assign placed = {d_in_i, {(BUF_W-IN_W){1'b0}}} >> count_o;

  always_ff @(posedge clk) begin
    if (!rst_n || reset_i) begin
      q_o     <= '0;
      count_o <= '0;
    end else if (load_i) begin
      q_o     <= q_o | placed;
      count_o <= count_o + CW'(IN_W);
    end else if (shift_i) begin
      q_o     <= q_o << shamt_i;
      count_o <= count_o - shamt_i;
    end
  end

  a_no_load_and_shift: assert property (@(posedge clk) disable iff (!rst_n) !(load_i && shift_i));
  a_load_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                load_i |-> (32'(count_o) + IN_W <= BUF_W));
  a_shift_fits: assert property (@(posedge clk) disable iff (!rst_n)
                                 shift_i |-> (shamt_i <= count_o));
endmodule
