// tb_system_response: closed-loop run of the whole accelerator against a
// model of the host camera controller, in the spirit of the system tests of
// a wearable navigation aid (camera held still / shaken, and a camera moving
// away from a wall). Default parameters, 80x60 frames.
//
// Host model (testbench only): a frame server renders each frame from the
// current illumination level L (0..3), waits for that frame's illumination
// step and SkipFrame flag, then
//   L         <- clamp(L + step, 0, 3)
//   FrameRate <- FrameRate + (k + q*StepRate) * (Desired - skip)   (per frame)
// with k = 2, q = 1 /Hz, Desired = 0.5. A field controller would smooth the
// illumination steps over about three seconds of frames; here each step is
// applied at once so that a short run shows the whole response. An IMU stream with a 1.875 Hz step
// tone runs alongside, so StepRate becomes non-zero part way through.
//
// Scene: a wall with vertical stripes. Confidence falls with distance and
// rises with illumination: conf = 120*(L+1)/d^2 (d in metres, clipped).
//   f0-f3   d = 0.45 m, still        f4-f6  d = 0.45 m, moving (stripes shift)
//   f7-f9   d = 0.9 m,  still        f10-f13 d = 2.0 m, still
// A second frame-rate model with q = 0 runs beside it, as if no steps were
// detected.
// Checks: SkipFrame is set exactly for still frames at an unchanged distance;
// the illumination starts at full power and steps down to 0 at the near
// wall, and climbs back to 3 at 2 m; the frame rate falls over still
// stretches and rises over the moving one, faster than with q = 0; the step
// rate is 1.875 Hz.
module tb_system_response;
  import nav_pkg::*;
  localparam int W = 80, H = 60, NPIX = W * H, NFR = 14;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pix_valid, pix_ready, pc_valid, pc_ready, pc_last;
  pixel_t pix_data;
  coord_t pc_coord;
  logic skip_valid, skip_ready, skip_frame, illum_valid, illum_ready;
  illum_delta_t illum_delta;
  logic imu_valid, imu_ready, rate_valid, rate_ready;
  motion_t imu_sample;
  step_rate_t rate;

  nav_accel_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int level = 3;
  int n_pix = 0, n_pc = 0, n_imu = 0;
  real step_hz = 0.0, frame_rate = 30.0, frame_rate_k = 30.0;
  real fr_hist [NFR], frk_hist [NFR];
  int lvl_hist [NFR];
  int skip_seen, illum_seen;
  bit last_skip;
  int last_illum;
  int cur_frame = 0;
  bit streaming = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic real dist_of(int f);
    return (f < 7) ? 0.45 : (f < 10) ? 0.9 : 2.0;
  endfunction

  function automatic int shift_of(int f);
    return (f >= 4 && f <= 6) ? 4 * (f - 3) : (f > 6 ? 12 : 0);
  endfunction

  function automatic bit expect_skip(int f);
    return !(f >= 4 && f <= 6) && f != 7 && f != 10;
  endfunction

  function automatic pixel_t render(int f, int p, int lvl);
    int x, y, ph, cf;
    real d;
    x = p / H; y = p % H;
    d = dist_of(f);
    ph = int'(d / 2.5 * 4096.0) + x / 4 + ((((x + shift_of(f)) / 8) % 2) != 0 ? 40 : 0)
         + int'($urandom_range(0, 1));
    cf = int'(120.0 * real'(lvl + 1) / (d * d));
    if (cf > 4095) cf = 4095;
    return '{phase: phase_t'(ph), conf: conf_t'(cf)};
  endfunction

  always_comb begin
    pix_valid  = rst_n && streaming;
    pix_data   = render(cur_frame, n_pix, level);
    imu_valid  = rst_n && n_imu < 512 && (cycle % 40 == 0);
    imu_sample = motion_t'(longint'($floor((1.0 + 0.4 * $sin(2.0 * PI * 12.0 * n_imu / 128.0)) * 65536.0)));
    pc_ready    = 1'b1;
    skip_ready  = 1'b1;
    illum_ready = 1'b1;
    rate_ready  = 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (pix_valid && pix_ready) begin
        if (n_pix == NPIX - 1) begin
          n_pix <= 0;
          streaming <= 1'b0;
        end else begin
          n_pix <= n_pix + 1;
        end
      end
      if (imu_valid && imu_ready) n_imu <= n_imu + 1;
      if (pc_valid) n_pc <= n_pc + 1;
      if (skip_valid) begin skip_seen <= skip_seen + 1; last_skip <= skip_frame; end
      if (illum_valid) begin illum_seen <= illum_seen + 1; last_illum <= int'(illum_delta); end
      if (rate_valid) begin
        step_hz <= real'(rate) / 65536.0;
        checks++;
        if (int'(rate) != 12 * 10240) begin
          failures++;
          $display("STEP RATE got %f Hz", real'(rate) / 65536.0);
        end
      end
    end
  end

  initial begin
    skip_seen = 0; illum_seen = 0; last_skip = 0; last_illum = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFR; f++) begin
      cur_frame = f;
      streaming = 1;
      wait (illum_seen == f + 1 && (f == 0 || skip_seen == f));
      @(posedge clk);
      // host controller
      level = level + last_illum;
      if (level < 0) level = 0;
      if (level > 3) level = 3;
      if (f > 0) begin
        checks++;
        if (last_skip != expect_skip(f)) begin
          failures++;
          $display("SKIP frame %0d got %0b expected %0b", f, last_skip, expect_skip(f));
        end
        frame_rate = frame_rate + (2.0 + 1.0 * step_hz) * (0.5 - (last_skip ? 1.0 : 0.0));
        frame_rate_k = frame_rate_k + 2.0 * (0.5 - (last_skip ? 1.0 : 0.0));
      end
      fr_hist[f] = frame_rate;
      frk_hist[f] = frame_rate_k;
      lvl_hist[f] = level;
      $display("frame %2d  d=%.2f m  skip=%0b  illum step %2d -> level %0d  step rate %.3f Hz  frame rate %.2f",
               f, dist_of(f), last_skip, last_illum, level, step_hz, frame_rate);
    end
    checks += 7;
    if (!(fr_hist[0] - fr_hist[3] > frk_hist[0] - frk_hist[3])) begin failures++; $display("step rate did not speed up the fall"); end
    if (!(fr_hist[6] - fr_hist[3] > frk_hist[6] - frk_hist[3])) begin failures++; $display("step rate did not speed up the rise"); end
    if (lvl_hist[3] != 0) begin failures++; $display("illumination did not fall to 0 at the near wall"); end
    if (lvl_hist[NFR - 1] != 3) begin failures++; $display("illumination did not reach 3 at 2 m"); end
    if (!(fr_hist[3] < fr_hist[0])) begin failures++; $display("frame rate did not fall while still"); end
    if (!(fr_hist[6] > fr_hist[3])) begin failures++; $display("frame rate did not rise while moving"); end
    if (n_pc != NFR * NPIX) begin failures++; $display("point count %0d", n_pc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFR * (NPIX + 1000) + 20000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
