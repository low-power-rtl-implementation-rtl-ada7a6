// Testbench for activation: random and corner-case sums and biases, with and
// without the leaky slope, against the integer reference (which also covers
// saturation at both ends).
module tb_activation;
  import tyolo_pkg::*;
  import tb_ref_pkg::*;
  acc_t acc_in; data_t bias; logic leaky; data_t y;
  logic clk = 0;
  always #5 clk = ~clk;
  activation dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input int a, input int b, input bit lk);
    int e;
    acc_in = acc_t'(a); bias = data_t'(b); leaky = lk;
    #1;
    e = act_ref(longint'(a), b, lk);
    checks++;
    if (y !== data_t'(e)) begin
      failures++; $display("acc=%0d bias=%0d leaky=%0d got %0d exp %0d", a, b, lk, y, e);
    end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    check(0, 0, 1); check(256, 0, 1); check(-256, 0, 1); check(-256, 0, 0);
    check(2147483647, 100, 1); check(-2147483647, -100, 1); check(-2147483647, -100, 0);
    check(-1, 0, 1); check(1000, -4, 1); check(-9000000, 0, 1);
    for (int i = 0; i < 300; i++)
      check(int'($urandom) >>> ($urandom_range(0, 20)), $urandom_range(0, 65535) - 32768, 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
