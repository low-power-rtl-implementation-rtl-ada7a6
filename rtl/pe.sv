// Processing element (PE) of the row-stationary convolution array.
//
// A PE performs a 1-D convolution of one filter row with one input row. It
// keeps the K weights of its filter row in a filter register file and the last
// K input values of its row in a sliding input register file, and it has one
// multiplier and one adder whose result is fed back as the running partial sum.
// Neighbouring windows overlap, so every input value that enters the input
// register file is reused by up to K outputs.
//
// Operation: weights are written with w_we/w_idx/w_data. Input values arrive
// one per accepted x_valid (x_ready high); x_first marks the first value of a
// row. Once K values of the row are held, the PE spends K cycles on
// multiply-accumulate (x_ready low) and then raises psum_valid for one cycle.
// psum_out is its own sum plus psum_in, which lets PEs of one array column
// chain their partial sums (the vertical accumulation of the row-stationary
// dataflow). A row of N values gives N-K+1 outputs; each output costs one
// accepted input plus K cycles of MAC.
//
// The register-file/MAC structure is the one the accelerator describes; the
// handshake and the per-tap sequencing are this design's choices.
module pe
  import tyolo_pkg::*;
#(
  parameter int K = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // filter register file load
  input  logic        w_we,
  input  logic [aw(K)-1:0] w_idx,
  input  data_t       w_data,
  // input row stream
  input  logic        x_valid,
  input  logic        x_first,
  input  data_t       x_data,
  output logic        x_ready,
  // partial sums
  input  acc_t        psum_in,
  output logic        psum_valid,
  output acc_t        psum_out
);

  data_t w_rf [K];
  data_t x_rf [K];
  logic [aw(K+1)-1:0] fill;
  logic [aw(K)-1:0]   tap;
  logic busy;
  acc_t acc;

  assign x_ready  = !busy;
  assign psum_out = acc + psum_in;

  always_ff @(posedge clk) begin
    if (w_we) w_rf[w_idx] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill       <= '0;
      tap        <= '0;
      busy       <= 1'b0;
      acc        <= '0;
      psum_valid <= 1'b0;
      for (int i = 0; i < K; i++) x_rf[i] <= '0;
    end else begin
      psum_valid <= 1'b0;
      if (busy) begin
        acc <= acc + acc_t'(w_rf[tap] * x_rf[tap]);
        if (tap == aw(K)'(K-1)) begin
          busy       <= 1'b0;
          psum_valid <= 1'b1;
        end else begin
          tap <= tap + 1'b1;
        end
      end else if (x_valid) begin
        for (int i = 0; i < K-1; i++) x_rf[i] <= x_rf[i+1];
        x_rf[K-1] <= x_data;
        if (x_first) begin
          fill <= 1;
          if (K == 1) begin busy <= 1'b1; tap <= '0; acc <= '0; end
        end else if (int'(fill) + 1 >= K) begin
          fill <= aw(K+1)'(K);
          busy <= 1'b1;
          tap  <= '0;
          acc  <= '0;
        end else begin
          fill <= fill + 1'b1;
        end
      end
    end
  end

endmodule
