// Input buffer: the zero-padded input window of one depth for one division.
//
// For a TILE x TILE output block and a KxK filter the window is
// WIN = TILE+K-1 values square. The layer controller writes it one value per
// cycle (zeros where the window reaches past the edge of the feature map) and
// the convolution engine then reads it one whole column per cycle, which
// feeds the WIN input rows of a PE array at once. Keeping the overlapping
// window locally lets the PEs reuse inputs without going back to the global
// buffers. The four buffers and their role follow the accelerator's block
// diagram; the window organisation and the column read are this design's.
//
// Write: we, wr_row, wr_col, wdata (one cycle). Read: rd_col selects the
// column, col_out is combinational.
module input_buffer
  import tyolo_pkg::*;
#(
  parameter int WIN = 15
) (
  input  logic               clk,
  input  logic               we,
  input  logic [aw(WIN)-1:0] wr_row,
  input  logic [aw(WIN)-1:0] wr_col,
  input  data_t              wdata,
  input  logic [aw(WIN)-1:0] rd_col,
  output data_t              col_out [WIN]
);

  data_t buf_q [WIN][WIN];

  always_ff @(posedge clk) begin
    if (we) buf_q[wr_row][wr_col] <= wdata;
  end

  always_comb begin
    for (int r = 0; r < WIN; r++) col_out[r] = buf_q[r][rd_col];
  end

endmodule
