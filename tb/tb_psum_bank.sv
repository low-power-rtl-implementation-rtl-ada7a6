// Testbench for psum_bank: stores random blocks in every internal memory by
// columns, then checks the adder's sum of the first n memories for every
// pixel and several n, including all of them.
module tb_psum_bank;
  import tyolo_pkg::*;
  localparam int NMEM = 5;
  localparam int TILE = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [aw(NMEM)-1:0] wmem; logic [aw(TILE)-1:0] wcol, rrow, rcol;
  acc_t wdata [TILE]; logic [aw(NMEM+1)-1:0] n_used; acc_t sum;
  psum_bank #(.NMEM(NMEM), .TILE(TILE)) dut (.*);
  int checks = 0, failures = 0;
  int ref_m [NMEM][TILE][TILE];
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; wmem = '0; wcol = '0; rrow = '0; rcol = '0; n_used = '0;
    for (int r = 0; r < TILE; r++) wdata[r] = '0;
    for (int m = 0; m < NMEM; m++)
      for (int c = 0; c < TILE; c++) begin
        @(negedge clk);
        we = 1; wmem = aw(NMEM)'(m); wcol = aw(TILE)'(c);
        for (int r = 0; r < TILE; r++) begin
          ref_m[m][r][c] = $urandom_range(0, 2000000) - 1000000;
          wdata[r] = acc_t'(ref_m[m][r][c]);
        end
      end
    @(negedge clk); we = 0;
    for (int n = 1; n <= NMEM; n += 2)
      for (int r = 0; r < TILE; r++)
        for (int c = 0; c < TILE; c++) begin
          longint e;
          e = 0;
          for (int m = 0; m < n; m++) e += ref_m[m][r][c];
          n_used = aw(NMEM+1)'(n); rrow = aw(TILE)'(r); rcol = aw(TILE)'(c);
          #1;
          checks++;
          if (sum !== acc_t'(e)) begin
            failures++; $display("n=%0d (%0d,%0d) got %0d exp %0d", n, r, c, sum, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
