// Max pooling unit: the largest of N consecutive values (N = 4 for 2x2).
//
// The pooling layers after convolution layers 1-5 halve each side of the
// feature map by keeping the largest value of every 2x2 window. This unit
// takes the window's values one per cycle (in_first on the first), keeps the
// running maximum and, one cycle after the N-th value, raises out_valid for one
// cycle with the maximum. The serial comparison is this design's choice.
module maxpool
  import tyolo_pkg::*;
#(
  parameter int N = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  data_t in_data,
  output logic  out_valid,
  output data_t out_data
);

  data_t cur;
  logic [aw(N+1)-1:0] cnt;
  data_t m_next;
  logic [aw(N+1)-1:0] cnt_next;

  always_comb begin
    m_next   = (in_first || in_data > cur) ? in_data : cur;
    cnt_next = in_first ? aw(N+1)'(1) : cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        cur <= m_next;
        cnt <= cnt_next;
        if (cnt_next == aw(N+1)'(N)) begin
          out_valid <= 1'b1;
          out_data  <= m_next;
        end
      end
    end
  end

endmodule
