// huff_address_generator: address counter of the Huffman decoder.
//
// Steps through the dictionary while it is loaded and while it is searched,
// and (as a second instance) through the words of the compressed stream.
// reset_i clears the address on the next clock, enable_i advances it by one;
// reset_i wins when both are high. The decoder's figure gives the block's
// name and its enable and reset inputs; the plain up-counter is this
// design's choice.
module huff_address_generator #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reset_i,
  input  logic              enable_i,
  output logic [ADDR_W-1:0] address_o
);
  always_ff @(posedge clk) begin
    if (!rst_n || reset_i) address_o <= '0;
    else if (enable_i)     address_o <= address_o + 1'b1;
  end
endmodule
