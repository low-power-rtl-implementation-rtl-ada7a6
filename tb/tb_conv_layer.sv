// Testbench for conv_layer at a reduced size: 4x4 input in 2x2 divisions,
// 10 input depths (three four-depth groups, the last one partly empty), two
// internal memories (so the depth takes two passes), 3 filters, leaky ReLU
// and 2x2 pooling. A behavioural input memory and a weight source with random
// gaps surround the layer; the whole output memory is then read back and
// compared with a direct software convolution, activation and pooling.
module tb_conv_layer;
  import tyolo_pkg::*;
  import tb_ref_pkg::*;

  localparam int H = 4, C_IN = 10, C_OUT = 3, K = 3, TILE = 2, LANES = 4, INT_MEMS = 2;
  localparam int HO = H / 2;
  localparam int IN_D = C_IN * H * H;
  localparam int OUT_D = C_OUT * HO * HO;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [aw(IN_D)-1:0] in_raddr [LANES];
  data_t in_rdata [LANES];
  logic wreq_valid; logic [15:0] wreq_filter;
  logic wdat_valid; data_t wdat;
  logic [aw(OUT_D)-1:0] out_raddr [1];
  data_t out_rdata [1];

  conv_layer #(.H(H), .C_IN(C_IN), .C_OUT(C_OUT), .K(K), .POOL(1'b1), .LEAKY(1'b1),
               .TILE(TILE), .LANES(LANES), .INT_MEMS(INT_MEMS), .NRD_OUT(1)) dut (.*);

  int checks = 0, failures = 0;
  int img [C_IN][H][H];

  // behavioural input memory, one cycle read latency
  always_ff @(posedge clk)
    for (int l = 0; l < LANES; l++) begin
      int a;
      a = int'(in_raddr[l]);
      in_rdata[l] <= data_t'(img[a / (H * H)][(a / H) % H][a % H]);
    end

  // weight source: on a request, stream C_IN*K*K weights and a bias with gaps
  initial begin
    wdat_valid = 0; wdat = '0;
    forever begin
      @(posedge clk);
      if (wreq_valid) begin
        int fl;
        fl = int'(wreq_filter);
        for (int i = 0; i <= C_IN * K * K; i++) begin
          repeat ($urandom_range(0, 2)) begin
            @(negedge clk); wdat_valid = 0;
          end
          @(negedge clk);
          wdat_valid = 1;
          wdat = data_t'((i == C_IN * K * K) ? gen_bias(1, fl) : gen_w(1, fl, i / (K * K), i % (K * K)));
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
          yy = y + ky - 1; xx = x + kx - 1;
          if (yy >= 0 && yy < H && xx >= 0 && xx < H)
            s += longint'(gen_w(1, f, c, ky * K + kx)) * img[c][yy][xx];
        end
    return act_ref(s, gen_bias(1, f), 1'b1);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int dones = 0;
  always @(negedge clk) if (done) dones++;

  initial begin
    start = 0; out_raddr[0] = '0;
    for (int c = 0; c < C_IN; c++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < H; x++) img[c][y][x] = $urandom_range(0, 1200) - 600;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    for (int f = 0; f < C_OUT; f++)
      for (int oy = 0; oy < HO; oy++)
        for (int ox = 0; ox < HO; ox++) begin
          int e;
          e = -100000;
          for (int q = 0; q < 4; q++) begin
            int v;
            v = ref_pix(f, 2 * oy + q / 2, 2 * ox + q % 2);
            if (v > e) e = v;
          end
          out_raddr[0] = aw(OUT_D)'((f * HO + oy) * HO + ox);
          @(negedge clk);
          checks++;
          if (out_rdata[0] !== data_t'(e)) begin
            failures++; $display("f%0d (%0d,%0d) got %0d exp %0d", f, oy, ox, out_rdata[0], e);
          end
        end
    checks++;
    if (dones != 1 || busy) begin failures++; $display("done count %0d busy %0d", dones, busy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
