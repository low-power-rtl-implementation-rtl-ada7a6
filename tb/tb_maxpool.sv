// Testbench for maxpool: groups of four random values, back to back, each
// checked against their maximum and for the one-cycle output latency.
module tb_maxpool;
  import tyolo_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_first, out_valid; data_t in_data, out_data;
  maxpool #(.N(4)) dut (.*);
  int checks = 0, failures = 0;
  int exp_q [$];
  int nout = 0, cyc = 0, last_in = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (out_data !== data_t'(e)) begin failures++; $display("got %0d exp %0d", out_data, e); end
    nout++;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    in_valid = 0; in_first = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int grp = 0; grp < 40; grp++) begin
      int mx;
      mx = -40000;
      for (int q = 0; q < 4; q++) begin
        int v;
        v = $urandom_range(0, 65535) - 32768;
        if (grp == 0) v = -1000 - q;  // all negative
        if (v > mx) mx = v;
        @(negedge clk);
        in_valid = 1; in_first = (q == 0); in_data = data_t'(v);
        if (grp % 5 == 4 && q == 2) begin
          @(negedge clk); in_valid = 0;
        end
      end
      exp_q.push_back(mx);
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nout != 40) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
