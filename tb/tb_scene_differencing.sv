// tb_scene_differencing: self-checking test of scene_differencing at the full
// 80x60 frame with the default 3x3 kernel and threshold. Six frames are
// streamed back to back: random, the same plus small noise (skip), a new
// random frame (no skip), an exact copy (skip, delta 0), a frame that differs
// in a single bright block (no skip) and a copy of it (skip). A reference
// model here filters every frame with the binomial kernel [1 2 1] x [1 2 1] /
// 16 (zero outside the frame), sums absolute differences and applies the
// threshold. Checks: no result after the first frame, each later flag, that
// the input takes one pixel every cycle without a stall (6*4800 pixels in
// 6*4800 cycles), and that the last flag follows the last pixel within 2*H+20
// cycles. The last two frames run with output back-pressure.
module tb_scene_differencing;
  import nav_pkg::*;
  localparam int W = 80, H = 60, NPIX = W * H, NFR = 6, GSKIP = 76800;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_skip;
  phase_t in_phase;

  scene_differencing dut (.*);

  int checks = 0, failures = 0;
  phase_t frames [NFR][NPIX];     // column-major: index = x*H + y
  int gauss [NFR][NPIX];
  bit expected [NFR];
  int n_in = 0, n_out = 0, cycle = 0, t_first = -1, t_last = -1, t_in_last = -1;
  int skips = 0, keeps = 0;
  bit stress = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int px(int f, int x, int y);
    if (x < 0 || x >= W || y < 0 || y >= H) return 0;
    return int'(frames[f][x * H + y]);
  endfunction

  task automatic reference();
    int wt [3] = '{1, 2, 1};
    for (int f = 0; f < NFR; f++)
      for (int x = 0; x < W; x++)
        for (int y = 0; y < H; y++) begin
          int s = 0;
          for (int i = -1; i <= 1; i++)
            for (int j = -1; j <= 1; j++) s += wt[i + 1] * wt[j + 1] * px(f, x + i, y + j);
          gauss[f][x * H + y] = s / 16;
        end
    for (int f = 1; f < NFR; f++) begin
      int d = 0;
      for (int p = 0; p < NPIX; p++) d += (gauss[f][p] > gauss[f-1][p]) ? gauss[f][p] - gauss[f-1][p]
                                                                       : gauss[f-1][p] - gauss[f][p];
      expected[f] = (d < GSKIP);
      $display("frame %0d: reference delta %0d skip %0b", f, d, expected[f]);
    end
  endtask

  always_comb begin
    in_valid = rst_n && (n_in < NFR * NPIX);
    in_phase = frames[(n_in < NFR * NPIX) ? n_in / NPIX : 0][n_in % NPIX];
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (t_first < 0) t_first <= cycle;
      if (n_in == NFR * NPIX - 1) t_in_last <= cycle;
      n_in <= n_in + 1;
    end
  end

  always @(negedge clk) out_ready <= !(stress && $urandom_range(0, 3) != 0);

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      n_out++;
      checks++;
      if (out_skip) skips++; else keeps++;
      if (out_skip != expected[n_out]) begin
        failures++;
        $display("MISMATCH frame %0d got skip=%0b expected %0b", n_out, out_skip, expected[n_out]);
      end
      if (n_out == NFR - 3) stress = 1;
      if (n_out == NFR - 1) t_last <= cycle;
    end
  end

  initial begin
    for (int p = 0; p < NPIX; p++) begin
      frames[0][p] = phase_t'($urandom_range(0, 4095));
      frames[1][p] = phase_t'(int'(frames[0][p]) + ((int'(frames[0][p]) < 4090) ? $urandom_range(0, 4) : 0));
      frames[2][p] = phase_t'($urandom_range(0, 4095));
      frames[3][p] = frames[2][p];
      frames[4][p] = frames[3][p];
      frames[5][p] = frames[3][p];
    end
    for (int x = 30; x < 40; x++)
      for (int y = 20; y < 40; y++) begin
        frames[4][x * H + y] = 12'd4095;
        frames[5][x * H + y] = 12'd4095;
      end
    reference();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_out == NFR - 1);
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != NFR - 1) begin
      failures++;
      $display("expected %0d results, saw %0d", NFR - 1, n_out);
    end
    $display("stream time %0d cycles for %0d frames", t_last - t_first, NFR);
    checks++;
    if (t_in_last - t_first != NFR * NPIX - 1) begin
      failures++;
      $display("THROUGHPUT: %0d pixels took %0d cycles", NFR * NPIX, t_in_last - t_first + 1);
    end
    checks++;
    if (t_last - t_in_last > 2 * H + 20) begin
      failures++;
      $display("LATENCY: last flag %0d cycles after the last pixel", t_last - t_in_last);
    end
    $display("last flag %0d cycles after the last pixel", t_last - t_in_last);
    checks++;
    if (skips == 0 || keeps == 0) begin
      failures++;
      $display("both outcomes must occur: skips=%0d keeps=%0d", skips, keeps);
    end
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
