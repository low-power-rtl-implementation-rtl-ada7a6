// Activation: bias, leaky ReLU and requantisation of one output pixel.
//
// The accumulated sum (Q16.16) gets the filter bias (Q8.8, aligned to
// Q16.16); if leaky is set, a negative result is scaled by 13/128 (about
// 0.1, the usual leaky-ReLU slope); the result is shifted back to Q8.8
// (rounding toward minus infinity) and saturated to 16 bits. With leaky clear
// the unit is linear, as for the last layer. Leaky ReLU after the convolution
// layers is the network's; the fixed-point slope, the bias alignment and the
// saturation are this design's choices. Purely combinational.
module activation
  import tyolo_pkg::*;
(
  input  acc_t  acc_in,
  input  data_t bias,
  input  logic  leaky,
  output data_t y
);

  localparam int TW = ACC_W + 8;
  localparam logic signed [TW-1:0] MAXV = TW'(2**(DATA_W-1) - 1);
  localparam logic signed [TW-1:0] MINV = -TW'(2**(DATA_W-1));

  logic signed [TW-1:0] t, a, q;

  always_comb begin
    t = TW'(acc_in) + (TW'(bias) <<< FRAC);
    a = (leaky && t < 0) ? ((t * TW'(13)) >>> 7) : t;
    q = a >>> FRAC;
    if (q > MAXV)      y = data_t'(MAXV);
    else if (q < MINV) y = data_t'(MINV);
    else               y = data_t'(q);
  end

endmodule
