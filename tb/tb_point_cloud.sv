// tb_point_cloud: self-checking test of point_cloud at the full 80x60 frame.
// Frame 1 streams random phases with the output always ready and checks that
// the whole frame (4800 coordinates) leaves within 4800 + 8 cycles of the
// first input. Frame 2 uses random input gaps and output back-pressure. Every
// coordinate is compared against the pinhole transform evaluated here in
// floating point, with a tolerance of 3 LSB of Q8.16, and out_last is checked.
module tb_point_cloud;
  import nav_pkg::*;
  localparam int W = 80, H = 60, N = W * H;
  localparam real FOVX = 74.0, FOVY = 59.0, R = 2.5, PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_last;
  phase_t in_phase;
  coord_t out_coord;

  point_cloud dut (.*);

  int checks = 0, failures = 0;
  phase_t phases [2*N];
  int n_in = 0, n_out = 0;
  int cycle = 0, first_in_cycle = -1, last_out_cycle = -1;
  bit gaps = 0;
  logic gap_now = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int expect_q16(input real r);
    return int'($floor(r * 65536.0));
  endfunction

  task automatic check_coord(input int idx, input coord_t c, input logic last);
    int p, x, y, ex, ey, ez;
    real u, v, k, ph;
    p = idx % N;
    x = p / H;  y = p % H;
    u = real'(x - W/2) * $tan(FOVX * PI / 180.0 / W);
    v = real'(y - H/2) * $tan(FOVY * PI / 180.0 / H);
    ph = real'(phases[idx]) / 4096.0;
    k = R * ph / $sqrt(1.0 + u*u + v*v);
    ex = expect_q16(k); ey = expect_q16(k * u); ez = expect_q16(k * v);
    checks++;
    if ((int'(c.x) - ex) > 3 || (ex - int'(c.x)) > 3 ||
        (int'(c.y) - ey) > 3 || (ey - int'(c.y)) > 3 ||
        (int'(c.z) - ez) > 3 || (ez - int'(c.z)) > 3 ||
        last != (p == N - 1)) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH idx=%0d x=%0d y=%0d got (%0d,%0d,%0d,%0b) exp (%0d,%0d,%0d,%0b)",
                 idx, x, y, c.x, c.y, c.z, last, ex, ey, ez, p == N - 1);
    end
  endtask

  // driver
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        if (first_in_cycle < 0) first_in_cycle = cycle;
        n_in <= n_in + 1;
      end
    end
  end
  always_comb begin
    in_valid = rst_n && (n_in < 2*N) && !gap_now;
    in_phase = phases[n_in < 2*N ? n_in : 0];
  end


  always @(negedge clk) begin
    gap_now   <= gaps && ($urandom_range(0, 3) == 0);
    out_ready <= !(gaps && ($urandom_range(0, 2) == 0));
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      check_coord(n_out, out_coord, out_last);
      n_out++;
      if (n_out == N) last_out_cycle = cycle;
    end
  end

  initial begin
    for (int i = 0; i < 2*N; i++) phases[i] = phase_t'($urandom);
    phases[0] = 12'hfff; phases[N/2] = 0;
    out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_out == N);
    checks++;
    if (last_out_cycle - first_in_cycle > N + 8) begin
      failures++;
      $display("THROUGHPUT frame took %0d cycles", last_out_cycle - first_in_cycle);
    end
    gaps = 1;
    wait (n_out == 2*N);
    repeat (5) @(posedge clk);
    $display("frame latency %0d cycles", last_out_cycle - first_in_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
