// Full-size workload test of single layers at their Tiny-YOLO-v2 sizes, with
// the default 13x13 tile, four lanes and 64 internal memories:
//   Conv-5  26x26x128  -> 256 filters 3x3, four divisions, 2x2 pooling
//   Conv-6  13x13x256  -> 512 filters 3x3, all 64 internal memories in one pass
//   Conv-9  13x13x1024 -> 125 filters 1x1, linear, four passes of 64 memories
// Each layer runs in its own harness, one after the other; every output is
// compared with a software model, and each layer's cycle count is checked
// against the controller's schedule: per filter C_IN*K*K+3 cycles of weight
// load, per division and four-depth group one engine run of
// (13+K-1)^2+1 + K*K + (K-1)+13(K+1)+1 cycles, per division and pass a
// 169-cycle reduction, and 4 (pooling) or 1 cycles per output pixel.
module tb_layer_full;
  import tyolo_pkg::*;

  localparam int NL = 3;
  localparam int LID [NL]  = '{4, 5, 8};
  localparam int HH [NL]   = '{26, 13, 13};
  localparam int CI [NL]   = '{128, 256, 1024};
  localparam int CO [NL]   = '{256, 512, 125};
  localparam int KK [NL]   = '{3, 3, 1};
  localparam bit PL [NL]   = '{1'b1, 1'b0, 1'b0};
  localparam bit LK [NL]   = '{1'b1, 1'b1, 1'b0};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start [NL];
  logic fin [NL];
  int cyc_l [NL], chk [NL], fail [NL];

  for (genvar i = 0; i < NL; i++) begin : g_l
    layer_harness #(.LID(LID[i]), .H(HH[i]), .C_IN(CI[i]), .C_OUT(CO[i]), .K(KK[i]),
                    .POOL(PL[i]), .LEAKY(LK[i])) u_h (
      .clk(clk), .rst_n(rst_n), .start(start[i]), .finished(fin[i]),
      .cycles(cyc_l[i]), .checks(chk[i]), .failures(fail[i]));
  end

  function automatic longint schedule(input int i);
    int h, d, g, ni, np, run, ho;
    h = HH[i]; d = (h / 13) * (h / 13); g = (CI[i] + 3) / 4;
    ni = (g < 64) ? g : 64; np = (g + ni - 1) / ni;
    run = (13 + KK[i] - 1) * (13 + KK[i] - 1) + 1 + KK[i] * KK[i] + (KK[i] - 1) + 13 * (KK[i] + 1) + 1;
    ho = PL[i] ? h / 2 : h;
    return longint'(CO[i]) * (CI[i] * KK[i] * KK[i] + 3 + d * g * run + d * np * 169 + ho * ho * (PL[i] ? 4 : 1) + 1) + 2;
  endfunction

  int checks = 0, failures = 0;

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NL; i++) start[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NL; i++) begin
      start[i] = 1;
      wait (fin[i]);
      start[i] = 0;
      $display("Conv-%0d: %0d cycles (schedule %0d), %0d outputs checked, %0d wrong",
               LID[i] + 1, cyc_l[i], schedule(i), chk[i], fail[i]);
      checks += chk[i] + 1;
      failures += fail[i];
      if (longint'(cyc_l[i]) != schedule(i)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
