// tb_nav_accel_top: end-to-end test of the whole accelerator at its default
// size (80x60 frames, 128-point FFT), with no parameter overrides.
// Five camera frames built so that every mechanism is exercised:
//   f0  flat wall, dark (low confidence)          illumination +1
//   f1  f0 plus +0..2 noise, dark                  skip,    +1
//   f2  near and far objects, all bright           no skip, -1
//   f3  same phases, near dark and far bright      skip,     0
//   f4  random phases, confidence 0                no skip, +1
// and, at the same time, 256 IMU samples (1 g plus a 1.875 Hz step tone,
// one every 12 cycles), giving three overlapping FFT frames whose step rate
// must be 1.875 Hz. The point-cloud output gets random back-pressure and the
// illumination and SkipFrame outputs are held off until their engines have
// stalled the shared pixel stream for 50 cycles, so each of the three camera
// engines stalls it in turn. Checks: every coordinate against the
// pinhole transform computed here (3 LSB), out_last, every SkipFrame and
// illumination result, every step rate, and that each mechanism happened:
// skip and no-skip, no flag after the first frame, each illumination step,
// overlapping step frames, pixel-stream stalls caused by each engine and all
// four quadrant signs.
module tb_nav_accel_top;
  import nav_pkg::*;
  localparam int W = 80, H = 60, NPIX = W * H, NFR = 5, NIMU = 256;
  localparam real FOVX = 74.0, FOVY = 59.0, R = 2.5, PI = 3.14159265358979323846;

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
  pixel_t frames [NFR][NPIX];
  motion_t imu [NIMU];
  int n_pix = 0, n_pc = 0, n_skip = 0, n_illum = 0, n_imu = 0, n_rate = 0;
  int exp_illum [NFR] = '{1, 1, -1, 0, 1};
  bit exp_skip [NFR] = '{0, 1, 0, 1, 0};
  // mechanism counters
  int m_skip = 0, m_noskip = 0, m_up = 0, m_down = 0, m_hold = 0, m_stall = 0;
  int m_stall_pc = 0, m_stall_st = 0, m_stall_sd = 0;
  int m_neg_y = 0, m_pos_y = 0, m_neg_z = 0, m_pos_z = 0, m_rates = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always_comb begin
    pix_valid  = rst_n && n_pix < NFR * NPIX;
    pix_data   = frames[(n_pix < NFR * NPIX) ? n_pix / NPIX : 0][n_pix % NPIX];
    imu_valid  = rst_n && n_imu < NIMU && (cycle % 12 == 0);
    imu_sample = imu[n_imu < NIMU ? n_imu : 0];
  end

  always @(negedge clk) begin
    pc_ready    <= ($urandom_range(0, 9) != 0);
    // hold two result streams until their engines have backed up and
    // stalled the shared pixel input for a while
    skip_ready  <= (m_stall_sd >= 50);
    illum_ready <= (m_stall_st >= 50);
    rate_ready  <= 1'b1;
  end

  function automatic int q16f(real r);
    return int'($floor(r * 65536.0));
  endfunction

  function automatic bit near(int a, int b);
    return (a - b <= 3) && (b - a <= 3);
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (pix_valid && !pix_ready) m_stall++;
      if (pix_valid && !dut.pc_in_ready) m_stall_pc++;
      if (pix_valid && !dut.st_in_ready) m_stall_st++;
      if (pix_valid && !dut.sd_in_ready) m_stall_sd++;
      if (pix_valid && pix_ready) n_pix <= n_pix + 1;
      if (imu_valid && imu_ready) n_imu <= n_imu + 1;

      if (pc_valid && pc_ready) begin
        int p, x, y;
        real u, v, k;
        p = n_pc % NPIX;
        x = p / H;  y = p % H;
        u = real'(x - W/2) * $tan(FOVX * PI / 180.0 / W);
        v = real'(y - H/2) * $tan(FOVY * PI / 180.0 / H);
        k = R * (real'(frames[n_pc / NPIX][p].phase) / 4096.0) / $sqrt(1.0 + u*u + v*v);
        checks++;
        if (!near(int'(pc_coord.x), q16f(k)) || !near(int'(pc_coord.y), q16f(k * u)) ||
            !near(int'(pc_coord.z), q16f(k * v)) || pc_last != (p == NPIX - 1)) begin
          failures++;
          if (failures < 10) $display("POINT MISMATCH pixel %0d", n_pc);
        end
        if (pc_coord.y < 0) m_neg_y++;
        if (pc_coord.y > 0) m_pos_y++;
        if (pc_coord.z < 0) m_neg_z++;
        if (pc_coord.z > 0) m_pos_z++;
        n_pc++;
      end

      if (skip_valid && skip_ready) begin
        n_skip++;          // first result belongs to frame 1
        checks++;
        if (skip_frame) m_skip++; else m_noskip++;
        if (n_skip >= NFR || skip_frame != exp_skip[n_skip]) begin
          failures++;
          $display("SKIP MISMATCH frame %0d got %0b", n_skip, skip_frame);
        end
      end

      if (illum_valid && illum_ready) begin
        checks++;
        case (int'(illum_delta))
          1: m_up++;
          -1: m_down++;
          default: m_hold++;
        endcase
        if (n_illum >= NFR || int'(illum_delta) != exp_illum[n_illum]) begin
          failures++;
          $display("ILLUMINATION MISMATCH frame %0d got %0d", n_illum, illum_delta);
        end
        n_illum++;
      end

      if (rate_valid && rate_ready) begin
        checks++;
        m_rates++;
        if (int'(rate) != 12 * 10240) begin
          failures++;
          $display("STEP RATE MISMATCH %0d got %f Hz", n_rate, real'(rate) / 65536.0);
        end
        n_rate++;
      end
    end
  end

  task automatic build_frames();
    for (int p = 0; p < NPIX; p++) begin
      int x, y, sel;
      phase_t ph;
      x = p / H; y = p % H;
      // f0, f1: a tilted wall at about 0.6 m
      ph = phase_t'(1000 + x + y);
      frames[0][p] = '{phase: ph, conf: conf_t'($urandom_range(0, 40))};
      frames[1][p] = '{phase: phase_t'(int'(ph) + $urandom_range(0, 2)), conf: conf_t'($urandom_range(0, 40))};
      // f2, f3: near object (2000 px), far object (2000 px), middle (800 px)
      sel = (p < 2000) ? 0 : (p < 4000) ? 1 : 2;
      ph = (sel == 0) ? phase_t'(300) : (sel == 1) ? phase_t'(3000) : phase_t'(1500);
      frames[2][p] = '{phase: ph, conf: conf_t'(4000)};
      frames[3][p] = '{phase: ph, conf: (sel == 0) ? conf_t'(10) : conf_t'(4000)};
      frames[4][p] = '{phase: phase_t'($urandom_range(0, 4095)), conf: conf_t'(0)};
    end
    for (int i = 0; i < NIMU; i++)
      imu[i] = motion_t'(longint'($floor((1.0 + 0.5 * $sin(2.0 * PI * 12.0 * i / 128.0)) * 65536.0)));
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("mechanism %-34s seen %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("MECHANISM NEVER EXERCISED: %s", what);
    end
  endtask

  initial begin
    build_frames();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_pc == NFR * NPIX && n_illum == NFR && n_skip == NFR - 1 && n_rate == 3);
    repeat (2000) @(posedge clk);
    checks++;
    if (n_pc != NFR * NPIX || n_illum != NFR || n_skip != NFR - 1 || n_rate != 3) begin
      failures++;
      $display("result counts wrong: %0d %0d %0d %0d", n_pc, n_illum, n_skip, n_rate);
    end
    need("SkipFrame set", m_skip);
    need("SkipFrame clear", m_noskip);
    need("no flag after first frame", int'(n_skip == NFR - 1));
    need("illumination step up", m_up);
    need("illumination step down", m_down);
    need("illumination hold", m_hold);
    need("step rate from overlapping frames", int'(m_rates >= 3));
    need("pixel stream stall", m_stall);
    need("stall from point cloud", m_stall_pc);
    need("stall from scene statistics", m_stall_st);
    need("stall from scene differencing", m_stall_sd);
    need("coordinate Y negative", m_neg_y);
    need("coordinate Y positive", m_pos_y);
    need("coordinate Z negative", m_neg_z);
    need("coordinate Z positive", m_pos_z);
    $display("finished at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
