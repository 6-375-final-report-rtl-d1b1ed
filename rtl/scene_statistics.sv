// scene_statistics: decides, once per frame, whether the illumination of the
// camera should step up, step down or stay, favouring the largest (nearest,
// biggest) objects in the scene.
//
// Histogram stage (one pixel per cycle): each pixel's phase is converted to a
// distance bin of 0.15 m, bin = (phase * BIN_SCALE) >> 16, a constant
// reciprocal multiply standing in for the division by the bin width. The
// per-bin pixel count H(b) is incremented, and the per-bin confident count
// t(b) is incremented when the pixel's confidence reaches the confidence
// threshold function thr(b) = max(CONF_THR0 - b * CONF_THR_DEC, 0).
// After FRAME_PIX pixels both vectors are handed to the search side (a
// one-entry queue of register vectors) and the histogram restarts, so the
// next frame streams in while the previous one is being voted on.
//
// Search / Vote loop: Search scans all bins (one per cycle) for the largest
// bin not yet visited; Vote gives that bin a positive vote when
// 4*t <= H (t/H <= 0.25, too dark: raise illumination) and a negative vote
// when 4*t >= 3*H (t/H >= 0.75, brighter than needed: lower it). The bin's
// pixels are added to the covered count; once covered*100 >= M_PCT*FRAME_PIX
// (or every bin has been visited) the result sign(W1*Vp - W2*Vd) is queued
// at the output as -1, 0 or +1.
//
// Interface: valid/ready pixel stream in (phase and confidence), valid/ready
// stream of illum_delta_t out, one per frame. Timing: 1 pixel per cycle in;
// the search/vote loop needs at most NUM_BINS*(NUM_BINS+1) cycles and runs
// in the shadow of the next frame's histogram.
// The 0.15 m bins, the vote ratios 0.25/0.75, the M-percent stop rule and
// the weights follow the design. The bin scale (2.5 m unambiguous range), the
// threshold function, M = 50 and the weights of 1 are this design's
// assumptions, as is the sign convention of the vote.
module scene_statistics
  import nav_pkg::*;
#(
  parameter int unsigned FRAME_PIX    = 4800,
  parameter int unsigned NUM_BINS     = 17,
  parameter int unsigned BIN_SCALE    = 267,
  parameter int unsigned CONF_THR0    = 300,
  parameter int unsigned CONF_THR_DEC = 12,
  parameter int unsigned M_PCT        = 50,
  parameter int unsigned W1           = 1,
  parameter int unsigned W2           = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  pixel_t       in_pixel,
  output logic         out_valid,
  input  logic         out_ready,
  output illum_delta_t out_delta
);
  localparam int unsigned CW = $clog2(FRAME_PIX + 1);
  localparam int unsigned BW = $clog2(NUM_BINS);
  localparam int unsigned VW = $clog2(NUM_BINS + 1);

  typedef logic [CW-1:0] cnt_t;

  // ---------------- input FIFO ----------------
  logic   px_valid, px_pop;
  pixel_t px;
  sync_fifo #(.T(pixel_t), .DEPTH(2)) u_in_fifo (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_pixel),
    .out_valid(px_valid), .out_ready(px_pop), .out_data(px)
  );

  // ---------------- Histogram ----------------
  cnt_t hist [NUM_BINS];
  cnt_t thr_cnt [NUM_BINS];
  cnt_t pix_cnt;

  // search-side copy ("histogram -> search" queue of depth one)
  cnt_t s_hist [NUM_BINS];
  cnt_t s_thr [NUM_BINS];
  logic s_full;
  logic s_done;          // search/vote finished with the held frame

  logic [BW-1:0] px_bin;
  logic          px_conf_ok;
  logic          last_pix;
  logic          handoff_ok;

  function automatic logic [BW-1:0] phase_to_bin(input phase_t ph);
    logic [31:0] p;
    p = 32'(ph) * 32'(BIN_SCALE);
    p = p >> 16;
    return (p >= 32'(NUM_BINS)) ? BW'(NUM_BINS - 1) : BW'(p);
  endfunction

  function automatic logic [12:0] conf_threshold(input logic [BW-1:0] b);
    int t;
    t = int'(CONF_THR0) - int'(b) * int'(CONF_THR_DEC);
    return (t < 0) ? 13'd0 : 13'(t);
  endfunction

  always_comb begin
    px_bin     = phase_to_bin(px.phase);
    px_conf_ok = {1'b0, px.conf} >= conf_threshold(px_bin);
    last_pix   = (pix_cnt == cnt_t'(FRAME_PIX - 1));
    // the last pixel of a frame may only be taken once the search side is free
    handoff_ok = !s_full || s_done;
    px_pop     = px_valid && (!last_pix || handoff_ok);
  end

  // ---------------- Search / Vote ----------------
  typedef enum logic [1:0] {S_IDLE, S_SEARCH, S_VOTE, S_EMIT} state_t;
  state_t state;

  logic [NUM_BINS-1:0] visited;
  logic [BW-1:0]       scan_idx;
  logic [BW-1:0]       best_idx;
  cnt_t                best_val;
  logic                best_found;
  cnt_t                covered;
  logic [VW-1:0]       vp, vd;

  logic         res_valid, res_ready;
  illum_delta_t res_delta;

  logic [CW+7:0] needed_pct;
  logic signed [VW+16:0] score;

  always_comb begin
    needed_pct  = (CW+8)'(M_PCT) * (CW+8)'(FRAME_PIX);
    score = $signed((VW+17)'(W1) * (VW+17)'(vp)) - $signed((VW+17)'(W2) * (VW+17)'(vd));
    if (score > 0)      res_delta = 2'sd1;
    else if (score < 0) res_delta = -2'sd1;
    else                res_delta = 2'sd0;
  end

  assign s_done    = (state == S_EMIT) && res_ready;
  assign res_valid = (state == S_EMIT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pix_cnt <= '0;
      s_full  <= 1'b0;
      state   <= S_IDLE;
      visited <= '0;
      scan_idx <= '0;
      best_idx <= '0;
      best_val <= '0;
      best_found <= 1'b0;
      covered <= '0;
      vp <= '0;
      vd <= '0;
      for (int b = 0; b < int'(NUM_BINS); b++) begin
        hist[b] <= '0;
        thr_cnt[b] <= '0;
        s_hist[b] <= '0;
        s_thr[b] <= '0;
      end
    end else begin
      // histogram
      if (s_done) s_full <= 1'b0;
      if (px_pop) begin
        if (last_pix) begin
          pix_cnt <= '0;
          for (int b = 0; b < int'(NUM_BINS); b++) begin
            s_hist[b] <= hist[b] + ((BW'(b) == px_bin) ? cnt_t'(1) : cnt_t'(0));
            s_thr[b]  <= thr_cnt[b] + ((BW'(b) == px_bin && px_conf_ok) ? cnt_t'(1) : cnt_t'(0));
            hist[b] <= '0;
            thr_cnt[b] <= '0;
          end
          s_full <= 1'b1;
        end else begin
          pix_cnt <= pix_cnt + 1'b1;
          hist[px_bin] <= hist[px_bin] + 1'b1;
          if (px_conf_ok) thr_cnt[px_bin] <= thr_cnt[px_bin] + 1'b1;
        end
      end

      // search / vote controller
      case (state)
        S_IDLE: if (s_full && !s_done) begin
          visited    <= '0;
          covered    <= '0;
          vp         <= '0;
          vd         <= '0;
          scan_idx   <= '0;
          best_found <= 1'b0;
          best_val   <= '0;
          state      <= S_SEARCH;
        end
        S_SEARCH: begin
          if (!visited[scan_idx] && (!best_found || s_hist[scan_idx] > best_val)) begin
            best_idx   <= scan_idx;
            best_val   <= s_hist[scan_idx];
            best_found <= 1'b1;
          end
          if (scan_idx == BW'(NUM_BINS - 1)) begin
            scan_idx <= '0;
            state    <= S_VOTE;
          end else begin
            scan_idx <= scan_idx + 1'b1;
          end
        end
        S_VOTE: begin
          if (!best_found || best_val == '0) begin
            state <= S_EMIT;       // nothing left with any pixels
          end else begin
            logic [CW+1:0] t4, h1, h3;
            t4 = (CW+2)'(s_thr[best_idx]) << 2;
            h1 = (CW+2)'(best_val);
            h3 = (CW+2)'(best_val) * (CW+2)'(3);
            if (t4 <= h1)      vp <= vp + 1'b1;
            else if (t4 >= h3) vd <= vd + 1'b1;
            visited[best_idx] <= 1'b1;
            covered <= covered + best_val;
            best_found <= 1'b0;
            best_val <= '0;
            if ((CW+8)'(covered + best_val) * (CW+8)'(100) >= needed_pct)
              state <= S_EMIT;
            else
              state <= S_SEARCH;
          end
        end
        S_EMIT: if (res_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- output FIFO ----------------
  sync_fifo #(.T(illum_delta_t), .DEPTH(2)) u_out_fifo (
    .clk(clk), .rst_n(rst_n),
    .in_valid(res_valid), .in_ready(res_ready), .in_data(res_delta),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_delta)
  );

  a_pix_count_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    pix_cnt < cnt_t'(FRAME_PIX));
endmodule
