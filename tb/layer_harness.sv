// Test harness around one full-size conv_layer, used by tb_layer_full.
//
// It holds a behavioural input memory filled with generated pixels, a
// behavioural off-chip weight source that answers each filter request with
// C_IN*K*K weights and the bias, one word per cycle, and a software model of
// the layer (convolution with zero padding, bias, activation, optional 2x2
// pooling). On start it runs the layer, then reads the whole output memory
// back and compares it with the model. It reports the cycles the layer took
// and the checks and failures it counted, and raises finished at the end.
module layer_harness
  import tyolo_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int LID   = 0,      // layer index 0..8, selects weights and biases
  parameter int H     = 13,
  parameter int C_IN  = 4,
  parameter int C_OUT = 2,
  parameter int K     = 3,
  parameter bit POOL  = 1'b0,
  parameter bit LEAKY = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic finished,
  output int   cycles,
  output int   checks,
  output int   failures
);
  localparam int LANES = 4;
  localparam int HO = POOL ? H / 2 : H;
  localparam int IN_D = C_IN * H * H;
  localparam int OUT_D = C_OUT * HO * HO;
  localparam int P = (K - 1) / 2;

  logic busy, done, l_start;
  logic [aw(IN_D)-1:0] in_raddr [LANES];
  data_t in_rdata [LANES];
  logic wreq_valid; logic [15:0] wreq_filter;
  logic wdat_valid; data_t wdat;
  logic [aw(OUT_D)-1:0] out_raddr [1];
  data_t out_rdata [1];

  conv_layer #(.H(H), .C_IN(C_IN), .C_OUT(C_OUT), .K(K), .POOL(POOL), .LEAKY(LEAKY),
               .TILE(13), .LANES(LANES), .INT_MEMS(64), .NRD_OUT(1)) u_layer (
    .clk(clk), .rst_n(rst_n), .start(l_start), .busy(busy), .done(done),
    .in_raddr(in_raddr), .in_rdata(in_rdata),
    .wreq_valid(wreq_valid), .wreq_filter(wreq_filter), .wdat_valid(wdat_valid), .wdat(wdat),
    .out_raddr(out_raddr), .out_rdata(out_rdata));

  int img [IN_D];

  always_ff @(posedge clk)
    for (int l = 0; l < LANES; l++) in_rdata[l] <= data_t'(img[int'(in_raddr[l])]);

  function automatic int wv(input int f, input int c, input int k);
    return gen_w(LID, f, c, k) >>> 3;
  endfunction

  initial begin
    wdat_valid = 0; wdat = '0;
    forever begin
      @(posedge clk);
      if (wreq_valid) begin
        int fl;
        fl = int'(wreq_filter);
        for (int i = 0; i <= C_IN * K * K; i++) begin
          @(negedge clk);
          wdat_valid = 1;
          wdat = data_t'((i == C_IN * K * K) ? gen_bias(LID, fl) : wv(fl, i / (K * K), i % (K * K)));
        end
        @(negedge clk); wdat_valid = 0;
      end
    end
  end

  function automatic int ref_pix(input int f, input int y, input int x);
    longint s;
    s = 0;
    for (int c = 0; c < C_IN; c++)
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++) begin
          int yy, xx;
          yy = y + ky - P; xx = x + kx - P;
          if (yy >= 0 && yy < H && xx >= 0 && xx < H)
            s += longint'(wv(f, c, ky * K + kx)) * img[(c * H + yy) * H + xx];
        end
    return act_ref(s, gen_bias(LID, f), LEAKY);
  endfunction

  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t0;
    cyc = 0; finished = 0; cycles = 0; checks = 0; failures = 0;
    l_start = 0; out_raddr[0] = '0;
    for (int a = 0; a < IN_D; a++) img[a] = gen_px(LID + a / (H * H), (a / H) % H, a % H) - 100;
    wait (start);
    @(negedge clk); l_start = 1; t0 = cyc;
    @(negedge clk); l_start = 0;
    wait (done);
    cycles = cyc - t0;
    @(negedge clk);
    for (int f = 0; f < C_OUT; f++)
      for (int oy = 0; oy < HO; oy++)
        for (int ox = 0; ox < HO; ox++) begin
          int e;
          if (POOL) begin
            e = ref_pix(f, 2 * oy, 2 * ox);
            for (int q = 1; q < 4; q++)
              if (ref_pix(f, 2 * oy + q / 2, 2 * ox + q % 2) > e) e = ref_pix(f, 2 * oy + q / 2, 2 * ox + q % 2);
          end else e = ref_pix(f, oy, ox);
          out_raddr[0] = aw(OUT_D)'((f * HO + oy) * HO + ox);
          @(negedge clk);
          checks++;
          if (out_rdata[0] !== data_t'(e)) begin
            failures++;
            if (failures < 10) $display("layer %0d f%0d (%0d,%0d) got %0d exp %0d", LID + 1, f, oy, ox, out_rdata[0], e);
          end
        end
    finished = 1;
  end
endmodule
