// Testbench for input_buffer: fills a window with random values and reads
// every column back, comparing each of its values.
module tb_input_buffer;
  import tyolo_pkg::*;
  localparam int WIN = 6;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [aw(WIN)-1:0] wr_row, wr_col, rd_col; data_t wdata;
  data_t col_out [WIN];
  input_buffer #(.WIN(WIN)) dut (.*);
  int checks = 0, failures = 0;
  int ref_m [WIN][WIN];
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    we = 0; wr_row = '0; wr_col = '0; rd_col = '0; wdata = '0;
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++) begin
        ref_m[r][c] = $urandom_range(0, 65535) - 32768;
        @(negedge clk);
        we = 1; wr_row = aw(WIN)'(r); wr_col = aw(WIN)'(c); wdata = data_t'(ref_m[r][c]);
      end
    @(negedge clk); we = 0;
    for (int c = 0; c < WIN; c++) begin
      rd_col = aw(WIN)'(c);
      #1;
      for (int r = 0; r < WIN; r++) begin
        checks++;
        if (col_out[r] !== data_t'(ref_m[r][c])) begin
          failures++; $display("(%0d,%0d) got %0d exp %0d", r, c, col_out[r], ref_m[r][c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
