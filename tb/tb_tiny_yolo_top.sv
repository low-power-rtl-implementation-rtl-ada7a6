// End-to-end testbench for tiny_yolo_top at a reduced size.
//
// The nine layers keep their structure (3x3 filters, 1x1 last layer, pooling
// after layers 1-5, leaky ReLU, four-depth lanes) but run on a 64x64 picture
// with a 2x2 division tile, narrow layers and two internal memories, so that
// every mechanism shows up in a short run: zero padding at the map border,
// many divisions per map, a partly empty four-depth group (3 input depths),
// depth split over several passes of the internal memories, leaky ReLU on
// negative sums, 2x2 max pooling and the 1x1 layer. The picture is loaded
// through the image port, the weights come from a behavioural off-chip memory
// with random gaps, and after done every layer's output memory and the final
// result port are compared with a software model of the network. Each
// mechanism is counted; one that never happened counts as a failure.
module tb_tiny_yolo_top;
  import tyolo_pkg::*;
  import tb_ref_pkg::*;

  localparam int TILE = 2, IMG = 64, LANES = 4, INT_MEMS = 2;
  localparam int CH [NLAYER+1] = '{3, 4, 8, 8, 8, 8, 12, 12, 8, 5};
  localparam int IMG_D = CH[0] * IMG * IMG;
  localparam int HL = layer_dim(IMG, NLAYER-1);
  localparam int RES_D = CH[NLAYER] * HL * HL;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [NLAYER-1:0] layer_busy;
  logic img_we; logic [aw(IMG_D)-1:0] img_waddr; data_t img_wdata;
  logic wreq_valid; logic [3:0] wreq_layer; logic [15:0] wreq_filter;
  logic wdat_valid; data_t wdat;
  logic [aw(RES_D)-1:0] res_raddr; data_t res_rdata;

  tiny_yolo_top #(.TILE(TILE), .IMG(IMG), .LANES(LANES), .INT_MEMS(INT_MEMS), .CH(CH)) dut (.*);

  int checks = 0, failures = 0;
  int refo [NLAYER+1][];   // refo[0] = picture, refo[i+1] = output of layer i

  // ---------------- software model
  function automatic void model_layer(input int i);
    int h, ci, co, k, ho;
    bit pl;
    int conv [];
    h = layer_dim(IMG, i); ci = CH[i]; co = CH[i+1]; k = layer_k(i); pl = layer_pool(i);
    ho = pl ? h / 2 : h;
    conv = new[h * h];
    refo[i+1] = new[co * ho * ho];
    for (int f = 0; f < co; f++) begin
      for (int y = 0; y < h; y++)
        for (int x = 0; x < h; x++) begin
          longint s;
          s = 0;
          for (int c = 0; c < ci; c++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int yy, xx;
                yy = y + ky - (k - 1) / 2; xx = x + kx - (k - 1) / 2;
                if (yy >= 0 && yy < h && xx >= 0 && xx < h)
                  s += longint'(gen_w(i, f, c, ky * k + kx)) * refo[i][(c * h + yy) * h + xx];
              end
          conv[y * h + x] = act_ref(s, gen_bias(i, f), layer_leaky(i));
        end
      for (int y = 0; y < ho; y++)
        for (int x = 0; x < ho; x++) begin
          int m;
          if (pl) begin
            m = conv[(2 * y) * h + 2 * x];
            for (int q = 1; q < 4; q++)
              if (conv[(2 * y + q / 2) * h + 2 * x + q % 2] > m) m = conv[(2 * y + q / 2) * h + 2 * x + q % 2];
          end else m = conv[y * h + x];
          refo[i+1][(f * ho + y) * ho + x] = m;
        end
    end
  endfunction

  // ---------------- behavioural off-chip weight memory
  initial begin
    wdat_valid = 0; wdat = '0;
    forever begin
      @(posedge clk);
      if (wreq_valid) begin
        int li, fl, kk, n;
        li = int'(wreq_layer); fl = int'(wreq_filter);
        kk = layer_k(li) * layer_k(li);
        n = CH[li] * kk;
        for (int w = 0; w <= n; w++) begin
          if ($urandom_range(0, 3) == 0) begin
            @(negedge clk); wdat_valid = 0;
          end
          @(negedge clk);
          wdat_valid = 1;
          wdat = data_t'((w == n) ? gen_bias(li, fl) : gen_w(li, fl, w / kk, w % kk));
        end
        @(negedge clk); wdat_valid = 0;
      end
    end
  end

  // ---------------- mechanism counters and per-layer memory checks
  localparam int NMECH = 7;
  string mech_name [NMECH] = '{"zero padding", "division reuse", "empty lane", "multi-pass depth",
                               "leaky negative", "max pooling", "1x1 layer"};
  int mech [NMECH];
  event check_ev;
  int layer_checked;

  for (genvar i = 0; i < NLAYER; i++) begin : g_mon
    localparam int H  = layer_dim(IMG, i);
    localparam int HO = layer_pool(i) ? H / 2 : H;
    always @(negedge clk) if (rst_n) begin
      if (dut.g_layer[i].u_layer.ld_v && dut.g_layer[i].u_layer.ld_zero[0]) mech[0]++;
      if (dut.g_layer[i].u_layer.dm_we && (dut.g_layer[i].u_layer.tx > 0 || dut.g_layer[i].u_layer.ty > 0)) mech[1]++;
      if (dut.g_layer[i].u_layer.ld_v && dut.g_layer[i].u_layer.ld_zero[LANES-1] && !dut.g_layer[i].u_layer.ld_zero[0]
          && CH[i] % LANES != 0) mech[2]++;
      if (dut.g_layer[i].u_layer.dm_we && dut.g_layer[i].u_layer.p > 0) mech[3]++;
      if (dut.g_layer[i].u_layer.dm_we && layer_leaky(i) && dut.g_layer[i].u_layer.u_act.t < 0) mech[4]++;
      if (dut.g_layer[i].u_layer.mp_v && layer_pool(i)) mech[5]++;
      if (dut.g_layer[i].u_layer.dm_we && layer_k(i) == 1) mech[6]++;
    end
    initial begin
      @(check_ev);
      for (int a = 0; a < CH[i+1] * HO * HO; a++) begin
        checks++;
        if (dut.g_layer[i].u_layer.u_out.mem[a] !== data_t'(refo[i+1][a])) begin
          failures++;
          if (failures < 20) $display("layer %0d addr %0d got %0d exp %0d", i + 1, a,
                                      dut.g_layer[i].u_layer.u_out.mem[a], refo[i+1][a]);
        end
      end
      layer_checked++;
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t0;
    cyc = 0; layer_checked = 0;
    for (int m = 0; m < NMECH; m++) mech[m] = 0;
    start = 0; img_we = 0; img_waddr = '0; img_wdata = '0; res_raddr = '0;
    refo[0] = new[IMG_D];
    for (int c = 0; c < CH[0]; c++)
      for (int y = 0; y < IMG; y++)
        for (int x = 0; x < IMG; x++) refo[0][(c * IMG + y) * IMG + x] = gen_px(c, y, x);
    for (int i = 0; i < NLAYER; i++) model_layer(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < IMG_D; a++) begin
      @(negedge clk);
      img_we = 1; img_waddr = aw(IMG_D)'(a); img_wdata = data_t'(refo[0][a]);
    end
    @(negedge clk); img_we = 0; start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    wait (done);
    $display("inference took %0d cycles", cyc - t0);
    @(negedge clk);
    -> check_ev;
    #1;
    wait (layer_checked == NLAYER);
    for (int a = 0; a < RES_D; a++) begin
      res_raddr = aw(RES_D)'(a);
      @(negedge clk);
      checks++;
      if (res_rdata !== data_t'(refo[NLAYER][a])) begin
        failures++; $display("result %0d got %0d exp %0d", a, res_rdata, refo[NLAYER][a]);
      end
    end
    for (int m = 0; m < NMECH; m++) begin
      $display("mechanism %-16s happened %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) failures++;
    end
    checks++;
    if (busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
