// dp_ram: simple dual-port synchronous RAM, one write port and one read port.
//
// This is the 1024 x 32 block RAM from which every memory bank is built.
// Port A writes wd_i at wa_i on a clock edge where we_i is high. Port B reads:
// on an edge where re_i is high, rd_o takes the word at ra_i, so read data
// appears one clock after the request and then holds until the next read.
// A read and a write of the same address in one cycle return the old word.
// Contents are not reset, as in a block RAM. The size and the dual-port
// organisation follow the design; the read-first behaviour and the separate
// read enable are this implementation's choice.
module dp_ram #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we_i,
  input  logic [AW-1:0]     wa_i,
  input  logic [DATA_W-1:0] wd_i,
  input  logic              re_i,
  input  logic [AW-1:0]     ra_i,
  output logic [DATA_W-1:0] rd_o
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[wa_i] <= wd_i;
  end

  always_ff @(posedge clk) begin
    if (re_i) rd_o <= mem[ra_i];
  end
endmodule
