// Convolution engine: LANES row-stationary PE arrays working side by side.
//
// Each lane convolves one input depth with the matching KxK slice of the
// current filter; the engine adds the lanes' outputs, so one pass over the
// input block gives the partial result of LANES depths for a TILE x TILE
// output block (one "division"). Reading four input memories and four filter
// memories at a time is how the accelerator processes depth; the plain adder
// across lanes is this design's choice.
//
// Interface: w_data[l] / x_col[l] feed lane l; the weight address and the
// column handshake are shared, because all lanes run in lock step. out_valid
// pulses once per output column (TILE times per block); out_col[j] is the sum
// over lanes for output row j of that column. The output is combinational
// from the PE registers, so it is valid in the cycle out_valid is high.
module conv_engine
  import tyolo_pkg::*;
#(
  parameter int K     = 3,
  parameter int TILE  = 13,
  parameter int LANES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             w_we,
  input  logic [aw(K)-1:0] w_row,
  input  logic [aw(K)-1:0] w_col,
  input  data_t            w_data [LANES],
  input  logic             x_valid,
  input  logic             x_first,
  input  data_t            x_col [LANES][TILE+K-1],
  output logic             x_ready,
  output logic             out_valid,
  output acc_t             out_col [TILE]
);

  logic lane_rdy [LANES];
  logic lane_ov  [LANES];
  acc_t lane_out [LANES][TILE];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    pe_array #(.K(K), .TILE(TILE)) u_arr (
      .clk(clk), .rst_n(rst_n),
      .w_we(w_we), .w_row(w_row), .w_col(w_col), .w_data(w_data[l]),
      .x_valid(x_valid), .x_first(x_first), .x_col(x_col[l]),
      .x_ready(lane_rdy[l]), .out_valid(lane_ov[l]), .out_col(lane_out[l])
    );
  end

  assign x_ready   = lane_rdy[0];
  assign out_valid = lane_ov[0];

  always_comb begin
    for (int j = 0; j < TILE; j++) begin
      out_col[j] = '0;
      for (int l = 0; l < LANES; l++) out_col[j] += lane_out[l][j];
    end
  end

endmodule
