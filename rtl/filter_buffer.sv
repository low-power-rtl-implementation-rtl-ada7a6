// Filter buffer: the weights of the current filter for the depths of one lane.
//
// Lane l of the engine processes depths l, l+LANES, l+2*LANES, ...; its buffer
// holds the KxK weights of those depths, DEPTH words in all, at address
// (depth/LANES)*K*K + (row*K + col). Weights are written one per cycle as they
// arrive from off-chip memory, once per filter, and read combinationally while
// the PE register files are loaded. The four filter buffers are the
// accelerator's; their addressing is this design's choice.
module filter_buffer
  import tyolo_pkg::*;
#(
  parameter int DEPTH = 288
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [aw(DEPTH)-1:0] waddr,
  input  data_t                wdata,
  input  logic [aw(DEPTH)-1:0] raddr,
  output data_t                rdata
);

  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
