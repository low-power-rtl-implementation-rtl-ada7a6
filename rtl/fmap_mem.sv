// Feature memory (global buffer) with one write port and NRD read ports.
//
// Used for the input picture, for the output of every layer (laid out channel
// by channel, row by row: address (c*H + y)*W + x) and for the per-filter
// division memories before pooling. Reads are registered, one cycle of
// latency, as in a block RAM. Holding layer outputs on chip between layers is
// the accelerator's; the flat address layout (equivalent to one memory per
// 13x13 division) and the number of read ports are this design's choices.
module fmap_mem
  import tyolo_pkg::*;
#(
  parameter int DEPTH = 2704,
  parameter int NRD   = 4
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [aw(DEPTH)-1:0] waddr,
  input  data_t                wdata,
  input  logic [aw(DEPTH)-1:0] raddr [NRD],
  output data_t                rdata [NRD]
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    for (int i = 0; i < NRD; i++) rdata[i] <= mem[raddr[i]];
  end

endmodule
