// tb_fft_superfolded: self-checking test of the 128-point superfolded FFT.
// Three frames: a complex exponential at bin 5 (one strong bin), random real
// samples in [-4, 4) and random complex samples, the last with random output
// back-pressure. Each output bin is compared with a direct DFT evaluated here
// in floating point (tolerance 0.005 in each component). The compute phase
// must take log2(N)*N/2 + 1 = 449 cycles with its two-step butterfly
// (last input to first output <= 450).
module tb_fft_superfolded;
  import nav_pkg::*;
  localparam int N = 128;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_last;
  complex_t in_data, out_data;
  logic [6:0] out_bin;

  fft_superfolded dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  real xr [N], xi [N];
  int n_in, n_out, t_last_in, t_first_out;
  bit stress = 0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) out_ready <= !(stress && $urandom_range(0, 2) == 0);

  function automatic fx16_16_t q(real r);
    return fx16_16_t'(longint'($floor(r * 65536.0 + 0.5)));
  endfunction

  task automatic run_frame(int kind);
    for (int i = 0; i < N; i++) begin
      case (kind)
        0: begin xr[i] = $cos(2.0 * PI * 5 * i / N); xi[i] = $sin(2.0 * PI * 5 * i / N); end
        1: begin xr[i] = (real'($urandom_range(0, 65535)) / 8192.0) - 4.0; xi[i] = 0.0; end
        default: begin
          xr[i] = (real'($urandom_range(0, 65535)) / 8192.0) - 4.0;
          xi[i] = (real'($urandom_range(0, 65535)) / 8192.0) - 4.0;
        end
      endcase
      xr[i] = real'(q(xr[i])) / 65536.0;
      xi[i] = real'(q(xi[i])) / 65536.0;
    end
    n_in = 0; n_out = 0; t_first_out = -1;
    // load
    while (n_in < N) begin
      in_valid <= 1'b1;
      in_data  <= '{re: q(xr[n_in]), im: q(xi[n_in])};
      @(posedge clk);
      if (in_ready) begin
        n_in++;
        t_last_in = cycle;
      end
    end
    in_valid <= 1'b0;
    // unload and compare
    while (n_out < N) begin
      @(posedge clk);
      if (out_valid && out_ready) begin
        real er, ei, gr, gi;
        if (t_first_out < 0) t_first_out = cycle;
        er = 0.0; ei = 0.0;
        for (int i = 0; i < N; i++) begin
          real ang;
          ang = -2.0 * PI * real'(int'(out_bin) * i) / N;
          er += xr[i] * $cos(ang) - xi[i] * $sin(ang);
          ei += xr[i] * $sin(ang) + xi[i] * $cos(ang);
        end
        gr = real'(out_data.re) / 65536.0;
        gi = real'(out_data.im) / 65536.0;
        checks++;
        if (int'(out_bin) != n_out || out_last != (n_out == N - 1) ||
            (gr - er) > 0.005 || (er - gr) > 0.005 || (gi - ei) > 0.005 || (ei - gi) > 0.005) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH frame %0d bin %0d got (%f,%f) exp (%f,%f)", kind, out_bin, gr, gi, er, ei);
        end
        n_out++;
      end
    end
    checks++;
    if (t_first_out - t_last_in > 450) begin
      failures++;
      $display("COMPUTE took %0d cycles", t_first_out - t_last_in);
    end
    $display("frame %0d: compute latency %0d cycles", kind, t_first_out - t_last_in);
  endtask

  initial begin
    in_valid = 0;
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_frame(0);
    run_frame(1);
    stress = 1;
    run_frame(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
