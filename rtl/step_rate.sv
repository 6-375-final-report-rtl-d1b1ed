// step_rate: estimates how fast the wearer is stepping from the vertical
// acceleration measured by an IMU.
//
// Chunker: samples are written into a circular history of N entries. Once
// N samples are held, and then every N/2 new samples (50 % overlap between
// consecutive frames), the last N samples are streamed oldest first, as real
// values, into the superfolded FFT; the input is held off while a frame is
// being streamed. FFT bins 0..N/2-1 go through the CORDIC magnitude unit
// (the upper half mirrors the lower one for real input and is dropped). Find
// Peak keeps the largest magnitude among bins 1..N/2-1 (bin 0, the constant
// gravity term, is skipped) and, after the last bin, outputs
//   step_rate = peak_bin * SAMPLE_HZ / N   (Hz, Q8.16),
// e.g. 0.15625 Hz per bin at 20 Hz and N = 128. The result is a whole
// number of bins, so its low bits (11 at the defaults) and its top bits are
// always zero.
// Interface: valid/ready stream of motion_t (Q16.16, in g) in, valid/ready
// stream of step_rate_t out, one value per frame. Timing: about
// N + log2(N)*N/2 + N/2 + 20 cycles from the frame's last sample to its result
// (about 660 cycles at N = 128).
// The 128-point frames with 50 % overlap, FFT, CORDIC and peak search follow
// the design, which gives the sample rate as 20 Hz in its text; skipping bin 0
// and the output scaling are this design's choices.
module step_rate
  import nav_pkg::*;
#(
  parameter int unsigned N         = 128,
  parameter int unsigned SAMPLE_HZ = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  motion_t    in_sample,
  output logic       out_valid,
  input  logic       out_ready,
  output step_rate_t out_rate
);
  localparam int unsigned LOGN   = $clog2(N);
  localparam int unsigned HOP    = N / 2;
  localparam int unsigned BIN_HZ = SAMPLE_HZ * 65536 / N;   // Q16 Hz per bin

  // ---------------- Chunker ----------------
  motion_t         hist [N];
  logic [LOGN-1:0] wp;            // next write slot = oldest sample
  logic [LOGN:0]   filled;
  logic [LOGN:0]   new_cnt;
  logic            feeding;
  logic [LOGN-1:0] feed_ptr;
  logic [LOGN:0]   feed_cnt;

  logic     fft_in_ready;
  complex_t fft_in;

  logic start;
  assign start    = !feeding && (filled == (LOGN+1)'(N)) && (new_cnt >= (LOGN+1)'(HOP));
  assign in_ready = !feeding && !start;
  assign fft_in   = '{re: hist[feed_ptr], im: '0};

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) hist[wp] <= in_sample;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp       <= '0;
      filled   <= '0;
      new_cnt  <= '0;
      feeding  <= 1'b0;
      feed_ptr <= '0;
      feed_cnt <= '0;
    end else if (start) begin
      feeding  <= 1'b1;
      feed_ptr <= wp;
      feed_cnt <= '0;
      new_cnt  <= '0;
    end else if (!feeding) begin
      if (in_valid) begin
        wp <= wp + 1'b1;
        if (filled != (LOGN+1)'(N)) filled <= filled + 1'b1;
        new_cnt <= new_cnt + 1'b1;
      end
    end else if (fft_in_ready) begin
      feed_ptr <= feed_ptr + 1'b1;
      feed_cnt <= feed_cnt + 1'b1;
      if (feed_cnt == (LOGN+1)'(N - 1)) feeding <= 1'b0;
    end
  end

  // ---------------- FFT ----------------
  logic            fft_out_valid, fft_out_ready;
  complex_t        fft_out;
  logic [LOGN-1:0] fft_bin;
  logic            fft_last;

  fft_superfolded #(.N(N)) u_fft (
    .clk(clk), .rst_n(rst_n),
    .in_valid(feeding), .in_ready(fft_in_ready), .in_data(fft_in),
    .out_valid(fft_out_valid), .out_ready(fft_out_ready), .out_data(fft_out),
    .out_bin(fft_bin), .out_last(fft_last)
  );

  // ---------------- CORDIC magnitude ----------------
  logic            upper_half;
  logic            cor_in_ready, cor_out_valid, cor_out_ready;
  logic [33:0]     cor_mag;
  logic [LOGN-1:0] cor_bin;

  assign upper_half    = fft_bin[LOGN-1];
  assign fft_out_ready = upper_half ? 1'b1 : cor_in_ready;

  cordic_mag #(.ITER(16), .TAGW(LOGN)) u_cordic (
    .clk(clk), .rst_n(rst_n),
    .in_valid(fft_out_valid && !upper_half), .in_ready(cor_in_ready),
    .in_data(fft_out), .in_tag(fft_bin),
    .out_valid(cor_out_valid), .out_ready(cor_out_ready),
    .out_mag(cor_mag), .out_tag(cor_bin)
  );

  // ---------------- Find Peak ----------------
  logic [33:0]     best_mag;
  logic [LOGN-1:0] best_bin;
  logic            last_bin;
  logic            res_ready;
  logic            is_better;

  assign last_bin      = (cor_bin == LOGN'(HOP - 1));
  assign cor_out_ready = !last_bin || res_ready;
  assign is_better     = (cor_bin != '0) && (best_bin == '0 || cor_mag > best_mag);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      best_mag <= '0;
      best_bin <= '0;
    end else if (cor_out_valid && cor_out_ready) begin
      if (last_bin) begin
        best_mag <= '0;
        best_bin <= '0;
      end else if (is_better) begin
        best_mag <= cor_mag;
        best_bin <= cor_bin;
      end
    end
  end

  logic       res_valid;
  step_rate_t res_rate;
  logic [LOGN-1:0] final_bin;
  assign final_bin = is_better ? cor_bin : best_bin;
  assign res_valid = cor_out_valid && last_bin;
  assign res_rate  = step_rate_t'(32'(final_bin) * 32'(BIN_HZ));

  sync_fifo #(.T(step_rate_t), .DEPTH(2)) u_out_fifo (
    .clk(clk), .rst_n(rst_n),
    .in_valid(res_valid), .in_ready(res_ready), .in_data(res_rate),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_rate)
  );

  a_no_fft_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (feeding && fft_in_ready) |-> feed_cnt < (LOGN+1)'(N));
  // the FFT's frame marker must agree with the bin count used above
  a_fft_last_is_top_bin: assert property (@(posedge clk) disable iff (!rst_n)
    fft_out_valid |-> fft_last == (fft_bin == LOGN'(N - 1)));
endmodule
