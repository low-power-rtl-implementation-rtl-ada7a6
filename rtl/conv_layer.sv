// One convolution layer of the accelerator, with its controller.
//
// The layer convolves a C_IN x H x H feature map (read from the previous
// layer's memory through LANES read ports) with C_OUT filters of K x K x C_IN
// weights, "same" size with zero padding, adds the bias, applies leaky ReLU
// (LEAKY) and, if POOL, 2x2 max pooling; the result is kept in the layer's own
// output memory, C_OUT x HO x HO, where the next layer reads it.
//
// How it works. The map is cut into TILE x TILE divisions (4 for 26x26, 16
// for 52x52, ...), and one engine block of that size is reused for all of
// them. For each filter f:
//   1. WREQ/WLOAD: the filter's weights, then its bias, are requested from
//      off-chip memory and written into the LANES filter buffers.
//   2. For each division d, for each group of LANES depths:
//      BUFLD  the zero-padded (TILE+K-1)^2 window of each lane's depth is read
//             into its input buffer (one value per lane per cycle);
//      PELD   the K*K weights of each lane are written into the PE arrays;
//      STREAM the window is streamed through the engine, and the TILE output
//             columns are stored in internal memory g of the psum bank.
//      REDUCE once NI groups are stored, the adder sums the internal memories
//             pixel by pixel. If the depth needs more than INT_MEMS groups the
//             memories are reused in further passes and pass results are
//             added; after the last pass the sum is activated and written to
//             the division memory of the filter.
//   3. POOL: the filter's full H x H result is max-pooled 2x2 (or copied when
//      POOL is 0) into the output memory.
// done pulses once all filters are finished.
//
// Weight stream: wreq_valid pulses with wreq_filter; the source then delivers
// C_IN*K*K weights in depth, row, column order, followed by one bias word,
// each with wdat_valid (any spacing).
//
// Timing per engine run: (TILE+K-1)^2+1 cycles of buffer load, K*K of weight
// load and about TILE*(K+1)+K-1 of streaming; each reduction takes TILE^2
// cycles and pooling 4 (or 1) cycles per output pixel.
//
// The division tiling, the four-depth groups, the number of internal memories
// (depth/4, at most 64, reused in passes) and the add-then-pool order follow
// the accelerator. Zero padding of the whole map (neighbouring divisions
// supply each other's border pixels), the weight-stream protocol, the
// one-layer-at-a-time control and the serial pooling are this design's
// choices.
module conv_layer
  import tyolo_pkg::*;
#(
  parameter int H        = 26,
  parameter int C_IN     = 128,
  parameter int C_OUT    = 256,
  parameter int K        = 3,
  parameter bit POOL     = 1'b1,
  parameter bit LEAKY    = 1'b1,
  parameter int TILE     = 13,
  parameter int LANES    = 4,
  parameter int INT_MEMS = 64,
  parameter int NRD_OUT  = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  busy,
  output logic  done,
  // input feature map (previous layer's memory), registered reads
  output logic [aw(C_IN*H*H)-1:0] in_raddr [LANES],
  input  data_t                   in_rdata [LANES],
  // weights from off-chip memory
  output logic                    wreq_valid,
  output logic [15:0]             wreq_filter,
  input  logic                    wdat_valid,
  input  data_t                   wdat,
  // output feature map read ports, registered reads
  input  logic [aw(C_OUT*(POOL ? H/2 : H)*(POOL ? H/2 : H))-1:0] out_raddr [NRD_OUT],
  output data_t                   out_rdata [NRD_OUT]
);

  localparam int P        = (K - 1) / 2;
  localparam int WIN      = TILE + K - 1;
  localparam int KK       = K * K;
  localparam int DIVS     = H / TILE;
  localparam int G_TOT    = cdiv(C_IN, LANES);
  localparam int NI       = imin(G_TOT, INT_MEMS);
  localparam int NPASS    = cdiv(G_TOT, NI);
  localparam int FB_DEPTH = G_TOT * KK;
  localparam int HO       = POOL ? H / 2 : H;
  localparam int PW       = POOL ? 4 : 1;
  localparam int IN_DEPTH = C_IN * H * H;
  localparam int OUT_DEPTH = C_OUT * HO * HO;
  localparam int NWORDS   = C_IN * KK;

  typedef enum logic [3:0] {
    S_IDLE, S_WREQ, S_WLOAD, S_BUFLD, S_PELD, S_STREAM, S_REDUCE, S_POOL, S_DONE
  } state_t;
  state_t state;

  // ---------------- counters
  int f, tx, ty, p, g;           // filter, division column/row, pass, group in pass
  int wc, wk, wcnt;              // weight load: depth, tap, word count
  int br, bc, ld_cnt;            // buffer load window position
  int pk;                        // PE weight load tap
  int sc, oc;                    // stream column, output column
  int rr, rc;                    // reduce pixel
  int pi, pq, wp;                // pool: issue pixel, issue quadrant, written pixel
  data_t bias_q;

  int gg, ng_pass;
  assign gg      = p * NI + g;
  assign ng_pass = (p < NPASS - 1) ? NI : G_TOT - (NPASS - 1) * NI;

  // ---------------- filter buffers
  logic  fb_we  [LANES];
  data_t fb_rd  [LANES];
  for (genvar l = 0; l < LANES; l++) begin : g_fb
    assign fb_we[l] = (state == S_WLOAD) && wdat_valid && (wcnt < NWORDS) && (wc % LANES == l);
    filter_buffer #(.DEPTH(FB_DEPTH)) u_fb (
      .clk(clk), .we(fb_we[l]),
      .waddr(aw(FB_DEPTH)'((wc / LANES) * KK + wk)), .wdata(wdat),
      .raddr(aw(FB_DEPTH)'(gg * KK + pk)), .rdata(fb_rd[l])
    );
  end

  // ---------------- input buffers (one cycle behind the memory reads)
  logic ld_v;
  logic [aw(WIN)-1:0] ld_r, ld_c;
  logic ld_zero [LANES];
  data_t ib_col [LANES][WIN];
  for (genvar l = 0; l < LANES; l++) begin : g_ib
    input_buffer #(.WIN(WIN)) u_ib (
      .clk(clk), .we(ld_v),
      .wr_row(ld_r), .wr_col(ld_c),
      .wdata(ld_zero[l] ? data_t'(0) : in_rdata[l]),
      .rd_col(aw(WIN)'(sc)), .col_out(ib_col[l])
    );
  end

  // window read addresses; win_ok is low outside the map or past the last depth
  logic win_ok [LANES];
  always_comb begin
    int y, x, c;
    y = ty * TILE + br - P;
    x = tx * TILE + bc - P;
    for (int l = 0; l < LANES; l++) begin
      c = gg * LANES + l;
      win_ok[l] = (y >= 0 && y < H && x >= 0 && x < H && c < C_IN);
      in_raddr[l] = win_ok[l] ? aw(IN_DEPTH)'((c * H + y) * H + x) : '0;
    end
  end

  // ---------------- engine
  logic  eng_we, eng_xv, eng_xf, eng_rdy, eng_ov;
  acc_t  eng_out [TILE];
  assign eng_we = (state == S_PELD);
  assign eng_xv = (state == S_STREAM) && (sc < WIN);
  assign eng_xf = (sc == 0);

  conv_engine #(.K(K), .TILE(TILE), .LANES(LANES)) u_eng (
    .clk(clk), .rst_n(rst_n),
    .w_we(eng_we), .w_row(aw(K)'(pk / K)), .w_col(aw(K)'(pk % K)), .w_data(fb_rd),
    .x_valid(eng_xv), .x_first(eng_xf), .x_col(ib_col),
    .x_ready(eng_rdy), .out_valid(eng_ov), .out_col(eng_out)
  );

  // ---------------- internal memories + adder
  acc_t bank_sum;
  psum_bank #(.NMEM(NI), .TILE(TILE)) u_bank (
    .clk(clk), .we((state == S_STREAM) && eng_ov),
    .wmem(aw(NI)'(g)), .wcol(aw(TILE)'(oc)), .wdata(eng_out),
    .n_used(aw(NI+1)'(ng_pass)),
    .rrow(aw(TILE)'(rr)), .rcol(aw(TILE)'(rc)), .sum(bank_sum)
  );

  // pass accumulation (layers deeper than INT_MEMS*LANES)
  acc_t pacc [TILE][TILE];
  acc_t red_sum;
  data_t act_y;
  assign red_sum = bank_sum + ((p > 0) ? pacc[rr][rc] : acc_t'(0));

  activation u_act (.acc_in(red_sum), .bias(bias_q), .leaky(LEAKY), .y(act_y));

  // ---------------- division memory of the current filter (before pooling)
  logic  dm_we;
  logic [aw(H*H)-1:0] dm_raddr [1];
  data_t dm_rdata [1];
  assign dm_we = (state == S_REDUCE) && (p == NPASS - 1);
  always_comb begin
    int oy, ox;
    if (POOL) begin
      oy = (pi / HO) * 2 + pq / 2;
      ox = (pi % HO) * 2 + pq % 2;
    end else begin
      oy = pi / HO;
      ox = pi % HO;
    end
    dm_raddr[0] = aw(H*H)'(oy * H + ox);
  end

  fmap_mem #(.DEPTH(H*H), .NRD(1)) u_divmem (
    .clk(clk), .we(dm_we),
    .waddr(aw(H*H)'((ty * TILE + rr) * H + tx * TILE + rc)), .wdata(act_y),
    .raddr(dm_raddr), .rdata(dm_rdata)
  );

  // ---------------- pooling into the output memory
  logic pl_v, pl_first;
  logic mp_v;
  data_t mp_y;
  maxpool #(.N(PW)) u_pool (
    .clk(clk), .rst_n(rst_n), .in_valid(pl_v), .in_first(pl_first), .in_data(dm_rdata[0]),
    .out_valid(mp_v), .out_data(mp_y)
  );

  fmap_mem #(.DEPTH(OUT_DEPTH), .NRD(NRD_OUT)) u_out (
    .clk(clk), .we(mp_v),
    .waddr(aw(OUT_DEPTH)'((f * HO * HO) + wp)), .wdata(mp_y),
    .raddr(out_raddr), .rdata(out_rdata)
  );

  assign busy = (state != S_IDLE);
  assign wreq_valid  = (state == S_WREQ);
  assign wreq_filter = 16'(f);

  // ---------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      f <= 0; tx <= 0; ty <= 0; p <= 0; g <= 0;
      wc <= 0; wk <= 0; wcnt <= 0;
      br <= 0; bc <= 0; ld_cnt <= 0; ld_v <= 1'b0; ld_r <= '0; ld_c <= '0;
      for (int l = 0; l < LANES; l++) ld_zero[l] <= 1'b1;
      pk <= 0; sc <= 0; oc <= 0; rr <= 0; rc <= 0;
      pi <= 0; pq <= 0; wp <= 0; pl_v <= 1'b0; pl_first <= 1'b0;
      bias_q <= '0;
      for (int r = 0; r < TILE; r++)
        for (int c = 0; c < TILE; c++) pacc[r][c] <= '0;
    end else begin
      done  <= 1'b0;
      ld_v  <= 1'b0;
      pl_v  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          f <= 0;
          state <= S_WREQ;
        end
        S_WREQ: begin
          wc <= 0; wk <= 0; wcnt <= 0;
          state <= S_WLOAD;
        end
        S_WLOAD: if (wdat_valid) begin
          if (wcnt == NWORDS) begin
            bias_q <= wdat;
            tx <= 0; ty <= 0; p <= 0; g <= 0;
            br <= 0; bc <= 0; ld_cnt <= 0;
            state <= S_BUFLD;
          end else begin
            wcnt <= wcnt + 1;
            if (wk == KK - 1) begin wk <= 0; wc <= wc + 1; end
            else wk <= wk + 1;
          end
        end
        S_BUFLD: begin
          if (ld_cnt < WIN * WIN) begin
            ld_v <= 1'b1;
            ld_r <= aw(WIN)'(br);
            ld_c <= aw(WIN)'(bc);
            for (int l = 0; l < LANES; l++) ld_zero[l] <= !win_ok[l];
            if (bc == WIN - 1) begin bc <= 0; br <= br + 1; end
            else bc <= bc + 1;
            ld_cnt <= ld_cnt + 1;
          end else begin
            pk <= 0;
            state <= S_PELD;
          end
        end
        S_PELD: begin
          if (pk == KK - 1) begin
            pk <= 0;
            sc <= 0; oc <= 0;
            state <= S_STREAM;
          end else pk <= pk + 1;
        end
        S_STREAM: begin
          if (eng_xv && eng_rdy) sc <= sc + 1;
          if (eng_ov) begin
            if (oc == TILE - 1) begin
              if (g < ng_pass - 1) begin
                g <= g + 1;
                br <= 0; bc <= 0; ld_cnt <= 0;
                state <= S_BUFLD;
              end else begin
                rr <= 0; rc <= 0;
                state <= S_REDUCE;
              end
            end else oc <= oc + 1;
          end
        end
        S_REDUCE: begin
          pacc[rr][rc] <= red_sum;
          if (rr == TILE - 1 && rc == TILE - 1) begin
            g <= 0;
            br <= 0; bc <= 0; ld_cnt <= 0;
            if (p < NPASS - 1) begin
              p <= p + 1;
              state <= S_BUFLD;
            end else begin
              p <= 0;
              if (tx < DIVS - 1) begin
                tx <= tx + 1;
                state <= S_BUFLD;
              end else if (ty < DIVS - 1) begin
                tx <= 0;
                ty <= ty + 1;
                state <= S_BUFLD;
              end else begin
                pi <= 0; pq <= 0; wp <= 0;
                state <= S_POOL;
              end
            end
          end
          if (rc == TILE - 1) begin rc <= 0; rr <= rr + 1; end
          else rc <= rc + 1;
        end
        S_POOL: begin
          if (pi < HO * HO) begin
            pl_v     <= 1'b1;
            pl_first <= (pq == 0);
            if (pq == PW - 1) begin pq <= 0; pi <= pi + 1; end
            else pq <= pq + 1;
          end
          if (mp_v) begin
            if (wp == HO * HO - 1) begin
              if (f == C_OUT - 1) state <= S_DONE;
              else begin
                f <= f + 1;
                state <= S_WREQ;
              end
            end
            wp <= wp + 1;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- protocol checks
  a_wdat_when_loading: assert property (@(posedge clk) disable iff (!rst_n)
    wdat_valid |-> state == S_WLOAD)
    else $error("weight word outside a weight load");
  a_engine_out_in_stream: assert property (@(posedge clk) disable iff (!rst_n)
    eng_ov |-> state == S_STREAM)
    else $error("engine output outside streaming");

endmodule
