// Internal reused memories and the adder that sums them.
//
// Each run of the convolution engine covers LANES depths of one division and
// yields a TILE x TILE block of partial sums; run g of a pass is stored in
// internal memory g. When all runs of the pass are stored, the adder reads
// the same pixel of the first n_used memories and returns their sum, one pixel
// per cycle. Layers deeper than NMEM*LANES reuse the memories in several
// passes; the caller adds the pass results. Up to 64 memories and their reuse
// follow the accelerator; the combinational adder over all memories is this
// design's choice.
//
// Write: we, wmem, wcol and wdata[r] (row r) store one output column of a run.
// Read: rrow, rcol pick the pixel, sum is combinational.
module psum_bank
  import tyolo_pkg::*;
#(
  parameter int NMEM = 64,
  parameter int TILE = 13
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [aw(NMEM)-1:0]   wmem,
  input  logic [aw(TILE)-1:0]   wcol,
  input  acc_t                  wdata [TILE],
  input  logic [aw(NMEM+1)-1:0] n_used,
  input  logic [aw(TILE)-1:0]   rrow,
  input  logic [aw(TILE)-1:0]   rcol,
  output acc_t                  sum
);

  acc_t mem [NMEM][TILE][TILE];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int r = 0; r < TILE; r++) mem[wmem][r][wcol] <= wdata[r];
    end
  end

  always_comb begin
    sum = '0;
    for (int m = 0; m < NMEM; m++) begin
      if (aw(NMEM+1)'(m) < n_used) sum += mem[m][rrow][rcol];
    end
  end

endmodule
