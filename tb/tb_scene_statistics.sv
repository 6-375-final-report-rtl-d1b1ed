// tb_scene_statistics: self-checking test of scene_statistics at the full
// 4800-pixel frame. Frames are streamed back to back: a dark frame (all
// confidence low, expect +1), a bright frame (all confidence high, expect
// -1), a balanced frame (expect 0) and random frames. Every result is compared
// with a reference model of the histogram / search / vote procedure written
// here. Each result must appear within FRAME_PIX + 400 cycles of the frame's
// first pixel, and the last frames run with random output back-pressure.
module tb_scene_statistics;
  import nav_pkg::*;
  localparam int NPIX = 4800, NB = 17, NFR = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  pixel_t in_pixel;
  illum_delta_t out_delta;

  scene_statistics dut (.*);

  int checks = 0, failures = 0;
  pixel_t frames [NFR][NPIX];
  int expected [NFR];
  int n_in = 0, n_out = 0, cycle = 0;
  int frame_start [NFR];
  bit stress = 0;
  int kind_seen [3];

  always @(posedge clk) cycle <= cycle + 1;

  // reference model
  function automatic int ref_delta(int f);
    int h [NB], t [NB];
    bit vis [NB];
    int covered, vp, vd, best, score;
    for (int b = 0; b < NB; b++) begin h[b] = 0; t[b] = 0; vis[b] = 0; end
    for (int i = 0; i < NPIX; i++) begin
      int b, thr;
      b = (int'(frames[f][i].phase) * 267) / 65536;
      if (b > NB - 1) b = NB - 1;
      thr = 300 - 12 * b; if (thr < 0) thr = 0;
      h[b]++;
      if (int'(frames[f][i].conf) >= thr) t[b]++;
    end
    covered = 0; vp = 0; vd = 0;
    forever begin
      best = -1;
      for (int b = 0; b < NB; b++)
        if (!vis[b] && (best < 0 || h[b] > h[best])) best = b;
      if (best < 0 || h[best] == 0) break;
      if (4 * t[best] <= h[best]) vp++;
      else if (4 * t[best] >= 3 * h[best]) vd++;
      vis[best] = 1;
      covered += h[best];
      if (covered * 100 >= 50 * NPIX) break;
    end
    score = vp - vd;
    return (score > 0) ? 1 : (score < 0) ? -1 : 0;
  endfunction

  always_comb begin
    in_valid = rst_n && (n_in < NFR * NPIX);
    in_pixel = frames[(n_in < NFR * NPIX) ? n_in / NPIX : 0][n_in % NPIX];
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (n_in % NPIX == 0) frame_start[n_in / NPIX] = cycle;
      n_in <= n_in + 1;
    end
  end

  always @(negedge clk) out_ready <= !(stress && $urandom_range(0, 1) == 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks += 2;
      kind_seen[int'(out_delta) + 1]++;
      if (int'(out_delta) != expected[n_out]) begin
        failures++;
        $display("MISMATCH frame %0d got %0d expected %0d", n_out, out_delta, expected[n_out]);
      end
      if (!stress && cycle - frame_start[n_out] > NPIX + 400) begin
        failures++;
        $display("LATENCY frame %0d took %0d cycles", n_out, cycle - frame_start[n_out]);
      end
      n_out++;
      if (n_out == 4) stress = 1;
    end
  end

  initial begin
    for (int f = 0; f < NFR; f++)
      for (int i = 0; i < NPIX; i++) begin
        phase_t ph; conf_t cf;
        ph = phase_t'($urandom_range(0, 4095));
        case (f)
          0: cf = conf_t'($urandom_range(0, 40));          // dark
          1: cf = conf_t'($urandom_range(400, 4095));      // bright
          2: begin                                        // equal near-dark and far-bright objects
               ph = (i < 2000) ? phase_t'(300) : (i < 4000) ? phase_t'(3000) : phase_t'(1500);
               cf = (i < 2000) ? conf_t'(10) : conf_t'(4000);
             end
          default: begin                                  // random scene with a dominant object
               if (i % 3 == 0) ph = phase_t'(500 + f * 300 + $urandom_range(0, 200));
               cf = conf_t'($urandom_range(0, 600));
             end
        endcase
        frames[f][i] = '{phase: ph, conf: cf};
      end
    for (int f = 0; f < NFR; f++) expected[f] = ref_delta(f);
    checks += 3;
    if (expected[0] != 1 || expected[1] != -1 || expected[2] != 0) begin
      failures++;
      $display("reference model disagrees with the hand-worked frames");
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_out == NFR);
    $display("results: -1 x%0d, 0 x%0d, +1 x%0d", kind_seen[0], kind_seen[1], kind_seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFR * NPIX * 3) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
