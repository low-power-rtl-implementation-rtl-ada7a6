// Tiny-YOLO-v2 convolution accelerator: the nine convolution layers.
//
// The picture (CH[0] x IMG x IMG, Q8.8) is written into the on-chip input
// memory through img_we/img_waddr/img_wdata; start then runs layers 1 to 9 one
// after the other. Every layer is its own conv_layer instance, sized by the
// layer table (filter counts CH, 3x3 filters except the 1x1 last layer, 2x2
// max pooling after layers 1-5, leaky ReLU on all but the last layer), and
// reads the previous layer's output memory directly. The weights and biases
// live off chip: the active layer asks for each filter with wreq_valid,
// wreq_layer and wreq_filter and receives CH_in*K*K weights and one bias word
// on wdat_valid/wdat. done pulses after the last layer; the 125 x 13 x 13
// detection tensor (for the default sizes) is then read through
// res_raddr/res_rdata (address (c*13 + y)*13 + x, one cycle of latency).
//
// The layer sizes, the 13x13 division tile and the four-depth lanes are the
// accelerator's; running the layers one at a time (rather than overlapped)
// and the memory and weight interfaces are this design's choices.
module tiny_yolo_top
  import tyolo_pkg::*;
#(
  parameter int TILE     = 13,
  parameter int IMG      = 416,
  parameter int LANES    = 4,
  parameter int INT_MEMS = 64,
  parameter int CH [NLAYER+1] = '{3, 16, 32, 64, 128, 256, 512, 1024, 1024, 125}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [NLAYER-1:0] layer_busy,
  // picture load
  input  logic                          img_we,
  input  logic [aw(CH[0]*IMG*IMG)-1:0]  img_waddr,
  input  data_t                         img_wdata,
  // weights from off-chip memory
  output logic        wreq_valid,
  output logic [3:0]  wreq_layer,
  output logic [15:0] wreq_filter,
  input  logic        wdat_valid,
  input  data_t       wdat,
  // result read port
  input  logic [aw(CH[NLAYER]*layer_dim(IMG, NLAYER-1)*layer_dim(IMG, NLAYER-1))-1:0] res_raddr,
  output data_t       res_rdata
);

  localparam int IMG_DEPTH = CH[0] * IMG * IMG;

  logic [NLAYER-1:0] l_done, l_wreq;
  logic [15:0]       l_wf [NLAYER];

  for (genvar i = 0; i < NLAYER; i++) begin : g_layer
    localparam int H    = layer_dim(IMG, i);
    localparam int CI   = CH[i];
    localparam int CO   = CH[i+1];
    localparam bit PL   = layer_pool(i);
    localparam int HO   = PL ? H / 2 : H;
    localparam int NRDO = (i == NLAYER-1) ? 1 : LANES;

    logic [aw(CI*H*H)-1:0] in_ra [LANES];
    data_t                 in_rd [LANES];
    logic [aw(CO*HO*HO)-1:0] out_ra [NRDO];
    data_t                   out_rd [NRDO];
    logic l_start;

    if (i == 0) begin : g_first
      assign l_start = start;
      fmap_mem #(.DEPTH(IMG_DEPTH), .NRD(LANES)) u_img (
        .clk(clk), .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
        .raddr(in_ra), .rdata(in_rd)
      );
    end else begin : g_next
      assign l_start = l_done[i-1];
      assign g_layer[i-1].out_ra = in_ra;
      assign in_rd = g_layer[i-1].out_rd;
    end

    if (i == NLAYER-1) begin : g_last
      assign out_ra[0] = res_raddr;
      assign res_rdata = out_rd[0];
    end

    conv_layer #(
      .H(H), .C_IN(CI), .C_OUT(CO), .K(layer_k(i)), .POOL(PL), .LEAKY(layer_leaky(i)),
      .TILE(TILE), .LANES(LANES), .INT_MEMS(INT_MEMS), .NRD_OUT(NRDO)
    ) u_layer (
      .clk(clk), .rst_n(rst_n), .start(l_start), .busy(layer_busy[i]), .done(l_done[i]),
      .in_raddr(in_ra), .in_rdata(in_rd),
      .wreq_valid(l_wreq[i]), .wreq_filter(l_wf[i]),
      .wdat_valid(wdat_valid && layer_busy[i]), .wdat(wdat),
      .out_raddr(out_ra), .out_rdata(out_rd)
    );
  end

  assign busy = |layer_busy;
  assign done = l_done[NLAYER-1];

  always_comb begin
    wreq_valid  = |l_wreq;
    wreq_layer  = '0;
    wreq_filter = '0;
    for (int i = 0; i < NLAYER; i++) begin
      if (layer_busy[i]) begin
        wreq_layer  = 4'(i);
        wreq_filter = l_wf[i];
      end
    end
  end

  // The layers run strictly one at a time.
  a_one_layer: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(layer_busy))
    else $error("more than one layer active");

endmodule
