// Row-stationary PE array for one input depth.
//
// The array computes a TILE x TILE output block of a KxK convolution of one
// input channel. It has K rows and TILE columns of PEs. PE(i,j) keeps filter
// row i and is fed padded input row i+j, so one input row is shared along a
// diagonal of the array and each filter row along an array row. The partial
// sums of the K PEs of column j are chained (PE(K-1,j) -> ... -> PE(0,j)) and
// give output row j of the block.
//
// Interface: the KxK weights are written one per cycle with w_we and the
// filter position (w_row, w_col); the weight goes to every PE of array row
// w_row. The padded input block (TILE+K-1 rows) is then streamed one column per
// accepted x_valid: x_col[r] is the value of padded row r, x_first marks column
// 0. After every K-th accepted column onwards, out_valid pulses with out_col[j]
// = output (row j, column c) for the next output column c = 0..TILE-1.
// All PEs run in lock step, so the handshake of PE(0,0) stands for the array.
//
// The K x TILE arrangement follows the row-stationary mapping the accelerator
// is built on (shown there as 3x3 PEs for three output rows); its extension to
// a whole TILE-row block is this design's choice.
module pe_array
  import tyolo_pkg::*;
#(
  parameter int K    = 3,
  parameter int TILE = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                w_we,
  input  logic [aw(K)-1:0]    w_row,
  input  logic [aw(K)-1:0]    w_col,
  input  data_t               w_data,
  input  logic                x_valid,
  input  logic                x_first,
  input  data_t               x_col [TILE+K-1],
  output logic                x_ready,
  output logic                out_valid,
  output acc_t                out_col [TILE]
);

  logic rdy   [K][TILE];
  logic pv    [K][TILE];

  for (genvar i = 0; i < K; i++) begin : g_row
    for (genvar j = 0; j < TILE; j++) begin : g_col
      acc_t pin, pout;
      if (i == K-1) begin : g_bottom
        assign pin = '0;
      end else begin : g_chain
        assign pin = g_row[i+1].g_col[j].pout;
      end
      pe #(.K(K)) u_pe (
        .clk(clk), .rst_n(rst_n),
        .w_we(w_we && (w_row == aw(K)'(i))), .w_idx(w_col), .w_data(w_data),
        .x_valid(x_valid && x_ready), .x_first(x_first), .x_data(x_col[i+j]),
        .x_ready(rdy[i][j]),
        .psum_in(pin), .psum_valid(pv[i][j]), .psum_out(pout)
      );
    end
  end

  assign x_ready   = rdy[0][0];
  assign out_valid = pv[0][0];
  for (genvar j = 0; j < TILE; j++) begin : g_out
    assign out_col[j] = g_row[0].g_col[j].pout;
  end

endmodule
