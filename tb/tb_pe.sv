// Testbench for pe: one 1-D convolution of a random row with a random filter
// row, with a partial sum coming in, checked value by value against a
// software sum; also checks that every output takes one input plus K cycles.
module tb_pe;
  import tyolo_pkg::*;

  localparam int K = 3;
  localparam int N = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic w_we; logic [aw(K)-1:0] w_idx; data_t w_data;
  logic x_valid, x_first, x_ready; data_t x_data;
  acc_t psum_in, psum_out; logic psum_valid;

  pe #(.K(K)) dut (.*);

  int checks = 0, failures = 0;
  int w [K];
  int x [N];
  int nout;
  longint exp_v;
  int t_first, t_last, cyc;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && psum_valid) begin
    exp_v = psum_in;
    for (int k = 0; k < K; k++) exp_v += longint'(w[k]) * x[nout + k];
    checks++;
    if (psum_out !== acc_t'(exp_v)) begin
      failures++;
      $display("out %0d: got %0d exp %0d", nout, psum_out, exp_v);
    end
    if (nout == 0) t_first = cyc;
    t_last = cyc;
    nout++;
  end

  initial begin
    cyc = 0; nout = 0;
    w_we = 0; w_idx = '0; w_data = '0; x_valid = 0; x_first = 0; x_data = '0;
    psum_in = 1234;
    for (int k = 0; k < K; k++) w[k] = $urandom_range(0, 2000) - 1000;
    for (int i = 0; i < N; i++) x[i] = $urandom_range(0, 2000) - 1000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < K; k++) begin
      w_we <= 1; w_idx <= aw(K)'(k); w_data <= data_t'(w[k]);
      @(posedge clk);
    end
    w_we <= 0;
    for (int i = 0; i < N; i++) begin
      x_valid <= 1; x_first <= (i == 0); x_data <= data_t'(x[i]);
      @(posedge clk);
      while (!x_ready) @(posedge clk);
    end
    x_valid <= 0;
    repeat (2 * K + 4) @(posedge clk);
    checks++;
    if (nout != N - K + 1) begin failures++; $display("outputs %0d", nout); end
    // steady state: one output every K+1 cycles
    checks++;
    if (t_last - t_first != (N - K) * (K + 1)) begin
      failures++; $display("spacing %0d", t_last - t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
