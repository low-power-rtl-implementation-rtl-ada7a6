// Shared constants and helpers for the Tiny-YOLO-v2 convolution accelerator.
//
// Number format: activations and weights are 16-bit two's-complement fixed
// point with 8 fraction bits (Q8.8); products and partial sums are kept in
// 32-bit accumulators (Q16.16). The network only says that it works in fixed
// point, so these widths are this design's choice.
//
// The layer table follows the nine convolution layers of Tiny-YOLO-v2:
// 3x3 filters in layers 1-8, 1x1 in layer 9, 2x2 max pooling after layers 1-5,
// leaky ReLU after layers 1-8 and a linear output in layer 9.
package tyolo_pkg;

  localparam int DATA_W = 16;  // activation / weight width (Q8.8)
  localparam int FRAC   = 8;   // fraction bits of DATA_W values
  localparam int ACC_W  = 32;  // partial-sum width (Q16.16)
  localparam int NLAYER = 9;   // convolution layers

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Filter size of layer i (0-based).
  function automatic int layer_k(input int i);
    return (i == NLAYER-1) ? 1 : 3;
  endfunction

  // 2x2 max pooling after layers 1-5.
  function automatic bit layer_pool(input int i);
    return i < 5;
  endfunction

  // Leaky ReLU after every layer but the last.
  function automatic bit layer_leaky(input int i);
    return i < NLAYER-1;
  endfunction

  // Input height/width of layer i for an input picture of img x img pixels.
  function automatic int layer_dim(input int img, input int i);
    return img >> ((i < 5) ? i : 5);
  endfunction

  function automatic int cdiv(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  function automatic int imin(input int a, input int b);
    return (a < b) ? a : b;
  endfunction

  function automatic int imax(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  // Bit width needed to index n entries (at least 1).
  function automatic int aw(input int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

endpackage
