// Testbench for conv_engine: four lanes, each with its own random 3x3 filter
// slice and padded input block; every output must equal the sum over lanes
// of the direct 2-D convolutions.
module tb_conv_engine;
  import tyolo_pkg::*;

  localparam int K = 3;
  localparam int TILE = 4;
  localparam int LANES = 4;
  localparam int WIN = TILE + K - 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic w_we; logic [aw(K)-1:0] w_row, w_col;
  data_t w_data [LANES];
  logic x_valid, x_first, x_ready, out_valid;
  data_t x_col [LANES][WIN];
  acc_t out_col [TILE];

  conv_engine #(.K(K), .TILE(TILE), .LANES(LANES)) dut (.*);

  int checks = 0, failures = 0;
  int w [LANES][K][K];
  int win [LANES][WIN][WIN];
  int oc;

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
      for (int l = 0; l < LANES; l++)
        for (int i = 0; i < K; i++)
          for (int k = 0; k < K; k++) e += longint'(w[l][i][k]) * win[l][j+i][oc+k];
      checks++;
      if (out_col[j] !== acc_t'(e)) begin
        failures++;
        $display("(%0d,%0d) got %0d exp %0d", j, oc, out_col[j], e);
      end
    end
    oc++;
  end

  initial begin
    oc = 0;
    w_we = 0; w_row = '0; w_col = '0; x_valid = 0; x_first = 0;
    for (int l = 0; l < LANES; l++) begin
      w_data[l] = '0;
      for (int r = 0; r < WIN; r++) x_col[l][r] = '0;
      for (int i = 0; i < K; i++) for (int k = 0; k < K; k++) w[l][i][k] = $urandom_range(0, 1000) - 500;
      for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) win[l][r][c] = $urandom_range(0, 1000) - 500;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < K; i++)
      for (int k = 0; k < K; k++) begin
        w_we <= 1; w_row <= aw(K)'(i); w_col <= aw(K)'(k);
        for (int l = 0; l < LANES; l++) w_data[l] <= data_t'(w[l][i][k]);
        @(posedge clk);
      end
    w_we <= 0;
    for (int c = 0; c < WIN; c++) begin
      x_valid <= 1; x_first <= (c == 0);
      for (int l = 0; l < LANES; l++)
        for (int r = 0; r < WIN; r++) x_col[l][r] <= data_t'(win[l][r][c]);
      @(posedge clk);
      while (!x_ready) @(posedge clk);
    end
    x_valid <= 0;
    repeat (3 * K) @(posedge clk);
    checks++;
    if (oc != TILE) begin failures++; $display("columns %0d", oc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
