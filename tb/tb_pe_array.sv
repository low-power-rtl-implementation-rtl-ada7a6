// Testbench for pe_array: a random 3x3 filter over a random padded block,
// streamed column by column; every output of the TILE x TILE block is
// compared with a direct 2-D convolution, and the number of output columns
// and the cycles between first and last are checked.
module tb_pe_array;
  import tyolo_pkg::*;

  localparam int K = 3;
  localparam int TILE = 5;
  localparam int WIN = TILE + K - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic w_we; logic [aw(K)-1:0] w_row, w_col; data_t w_data;
  logic x_valid, x_first, x_ready, out_valid;
  data_t x_col [WIN];
  acc_t out_col [TILE];

  pe_array #(.K(K), .TILE(TILE)) dut (.*);

  int checks = 0, failures = 0;
  int w [K][K];
  int win [WIN][WIN];
  int oc, cyc, t_first, t_last;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int j = 0; j < TILE; j++) begin
      longint e;
      e = 0;
      for (int i = 0; i < K; i++)
        for (int k = 0; k < K; k++) e += longint'(w[i][k]) * win[j+i][oc+k];
      checks++;
      if (out_col[j] !== acc_t'(e)) begin
        failures++;
        $display("(%0d,%0d) got %0d exp %0d", j, oc, out_col[j], e);
      end
    end
    if (oc == 0) t_first = cyc;
    t_last = cyc;
    oc++;
  end

  initial begin
    cyc = 0; oc = 0;
    w_we = 0; w_row = '0; w_col = '0; w_data = '0; x_valid = 0; x_first = 0;
    for (int r = 0; r < WIN; r++) x_col[r] = '0;
    for (int i = 0; i < K; i++) for (int k = 0; k < K; k++) w[i][k] = $urandom_range(0, 1000) - 500;
    for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) win[r][c] = $urandom_range(0, 1000) - 500;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < K; i++)
      for (int k = 0; k < K; k++) begin
        w_we <= 1; w_row <= aw(K)'(i); w_col <= aw(K)'(k); w_data <= data_t'(w[i][k]);
        @(posedge clk);
      end
    w_we <= 0;
    for (int c = 0; c < WIN; c++) begin
      x_valid <= 1; x_first <= (c == 0);
      for (int r = 0; r < WIN; r++) x_col[r] <= data_t'(win[r][c]);
      @(posedge clk);
      while (!x_ready) @(posedge clk);
    end
    x_valid <= 0;
    repeat (3 * K) @(posedge clk);
    checks++;
    if (oc != TILE) begin failures++; $display("columns %0d", oc); end
    checks++;
    if (t_last - t_first != (TILE - 1) * (K + 1)) begin failures++; $display("span %0d", t_last - t_first); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
