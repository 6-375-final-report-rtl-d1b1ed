// tb_step_rate: self-checking test of step_rate with N = 128 at 20 Hz.
// 384 samples of vertical acceleration are streamed: 1 g plus a 1.875 Hz
// step oscillation (bin 12) for the first 192 samples, then a stronger
// 3.90625 Hz oscillation (bin 25), plus small noise. With 50 % overlap this
// gives five frames (samples 0-127, 64-191, ..., 256-383). A reference model
// here takes each window's DFT magnitude in floating point and picks the
// largest bin in 1..63; the expected step rate is bin * 20/128 Hz in Q8.16.
// Checks: every result, the number of results, and that each result arrives
// within 700 cycles of the last sample of its window. Samples are spaced 12
// cycles apart so that each frame is processed before the next is complete.
module tb_step_rate;
  import nav_pkg::*;
  localparam int N = 128, NS = 384, NF = 5;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  motion_t in_sample;
  step_rate_t out_rate;

  step_rate dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  motion_t samples [NS];
  int exp_bin [NF];
  int t_window_end [NF];
  int n_in = 0, n_out = 0;
  bit gap = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always_comb begin
    in_valid  = rst_n && n_in < NS && !gap;
    in_sample = samples[n_in < NS ? n_in : 0];
  end
  always @(negedge clk) begin
    gap <= (cycle % 12) != 0;   // samples arrive far apart, as from a 20 Hz IMU
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if ((n_in + 1) >= N && ((n_in + 1) % (N / 2)) == 0) t_window_end[(n_in + 1) / (N / 2) - 2] <= cycle;
      n_in <= n_in + 1;
    end
    if (rst_n && out_valid && out_ready) begin
      checks += 2;
      if (int'(out_rate) != exp_bin[n_out] * 10240) begin
        failures++;
        $display("MISMATCH frame %0d got %0d expected bin %0d", n_out, out_rate, exp_bin[n_out]);
      end
      if (cycle - t_window_end[n_out] > 700) begin
        failures++;
        $display("LATENCY frame %0d: %0d cycles", n_out, cycle - t_window_end[n_out]);
      end
      $display("frame %0d: step rate %f Hz after %0d cycles", n_out, real'(out_rate) / 65536.0,
               cycle - t_window_end[n_out]);
      n_out++;
    end
  end

  initial begin
    real s [NS];
    for (int i = 0; i < NS; i++) begin
      if (i < 192) s[i] = 1.0 + 0.5 * $sin(2.0 * PI * 12.0 * i / N);
      else         s[i] = 1.0 + 0.8 * $sin(2.0 * PI * 25.0 * i / N);
      s[i] += (real'($urandom_range(0, 1000)) - 500.0) / 10000.0;
      samples[i] = motion_t'(longint'($floor(s[i] * 65536.0)));
    end
    for (int f = 0; f < NF; f++) begin
      real best;
      best = -1.0;
      for (int k = 1; k < N / 2; k++) begin
        real re, im, m;
        re = 0.0;
        im = 0.0;
        for (int i = 0; i < N; i++) begin
          real v;
          v = real'(samples[f * N / 2 + i]) / 65536.0;
          re += v * $cos(2.0 * PI * k * i / N);
          im -= v * $sin(2.0 * PI * k * i / N);
        end
        m = re * re + im * im;
        if (m > best) begin best = m; exp_bin[f] = k; end
      end
    end
    checks += 2;
    if (exp_bin[0] != 12 || exp_bin[NF - 1] != 25) begin
      failures++;
      $display("reference model did not find the step tones");
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_out == NF);
    repeat (2000) @(posedge clk);
    checks++;
    if (n_out != NF) begin
      failures++;
      $display("expected %0d results, saw %0d", NF, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
