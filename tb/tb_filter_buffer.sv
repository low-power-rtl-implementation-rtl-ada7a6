// Testbench for filter_buffer: writes random weights to every address, then
// reads them all back.
module tb_filter_buffer;
  import tyolo_pkg::*;
  localparam int DEPTH = 36;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [aw(DEPTH)-1:0] waddr, raddr; data_t wdata, rdata;
  filter_buffer #(.DEPTH(DEPTH)) dut (.*);
  int checks = 0, failures = 0;
  int ref_m [DEPTH];
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      ref_m[a] = $urandom_range(0, 65535) - 32768;
      @(negedge clk);
      we = 1; waddr = aw(DEPTH)'(a); wdata = data_t'(ref_m[a]);
    end
    @(negedge clk); we = 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      raddr = aw(DEPTH)'(a);
      #1;
      checks++;
      if (rdata !== data_t'(ref_m[a])) begin
        failures++; $display("%0d got %0d exp %0d", a, rdata, ref_m[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
