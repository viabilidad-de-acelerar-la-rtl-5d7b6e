// inverse_quantization: rebuilds a sample from its quantization index.
//
// out = data * K + Minimum, the inverse of a uniform quantizer with step K
// whose lowest level is Minimum. As in the design's figure, a register sits
// between the multiplier and the adder, so a new symbol can be multiplied
// while the previous product is added: one sample per clock, result on
// out_o / valid_o one clock after valid_i. The adder itself is not
// registered. K, Minimum and out_o are 32-bit two's complement numbers in one
// shared fixed-point format (the product keeps its low 32 bits); that number
// format is this design's choice.
module inverse_quantization #(
  parameter int unsigned SYM_W  = 8,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [SYM_W-1:0]  data_i,
  input  logic [DATA_W-1:0] k_i,
  input  logic [DATA_W-1:0] min_i,
  output logic              valid_o,
  output logic [DATA_W-1:0] out_o
);
  logic [DATA_W-1:0] prod_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prod_q  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) prod_q <= DATA_W'(k_i * DATA_W'(data_i));
    end
  end

  assign out_o = prod_q + min_i;
endmodule
