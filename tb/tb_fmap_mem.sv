// Testbench for fmap_mem: random writes, then reads on all ports at once with
// different addresses, checking data and the one-cycle read latency.
module tb_fmap_mem;
  import tyolo_pkg::*;
  localparam int DEPTH = 100;
  localparam int NRD = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [aw(DEPTH)-1:0] waddr; data_t wdata;
  logic [aw(DEPTH)-1:0] raddr [NRD]; data_t rdata [NRD];
  fmap_mem #(.DEPTH(DEPTH), .NRD(NRD)) dut (.*);
  int checks = 0, failures = 0;
  int ref_m [DEPTH];
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; waddr = '0; wdata = '0;
    for (int i = 0; i < NRD; i++) raddr[i] = '0;
    for (int a = 0; a < DEPTH; a++) begin
      ref_m[a] = $urandom_range(0, 65535) - 32768;
      @(negedge clk);
      we = 1; waddr = aw(DEPTH)'(a); wdata = data_t'(ref_m[a]);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      for (int i = 0; i < NRD; i++) raddr[i] = aw(DEPTH)'((a + 7 * i) % DEPTH);
      @(posedge clk); #1;
      for (int i = 0; i < NRD; i++) begin
        checks++;
        if (rdata[i] !== data_t'(ref_m[(a + 7 * i) % DEPTH])) begin
          failures++; $display("port %0d addr %0d got %0d", i, (a + 7 * i) % DEPTH, rdata[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
