// tb_cordic_mag: self-checking test of cordic_mag. 300 complex values (axes,
// all four quadrants, tiny and near full-scale magnitudes, random) are fed at
// one per cycle, with random output back-pressure for the second half. Each
// magnitude is compared with sqrt(re^2 + im^2) computed here (tolerance
// 0.02 % + 8 LSB), tags must come back in order, and the first result must
// appear ITER + 2 = 18 cycles after the first input.
module tb_cordic_mag;
  import nav_pkg::*;
  localparam int NV = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  complex_t in_data;
  logic [7:0] in_tag, out_tag;
  logic [33:0] out_mag;

  cordic_mag dut (.*);

  int checks = 0, failures = 0, cycle = 0, t_in0 = -1, t_out0 = -1;
  complex_t vals [NV];
  int n_in = 0, n_out = 0;
  bit stress = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always_comb begin
    in_valid = rst_n && n_in < NV;
    in_data  = vals[n_in < NV ? n_in : 0];
    in_tag   = 8'(n_in);
  end
  always @(negedge clk) out_ready <= !(stress && $urandom_range(0, 1) == 0);

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (t_in0 < 0) t_in0 <= cycle;
      n_in <= n_in + 1;
    end
    if (rst_n && out_valid && out_ready) begin
      real e, g, tol;
      if (t_out0 < 0) t_out0 = cycle;
      e = $sqrt(real'(vals[n_out].re) ** 2 + real'(vals[n_out].im) ** 2);
      g = real'(out_mag);
      tol = e * 0.0002 + 8.0;
      checks++;
      if (g - e > tol || e - g > tol || out_tag != 8'(n_out)) begin
        failures++;
        if (failures < 10) $display("MISMATCH %0d got %f exp %f tag %0d", n_out, g, e, out_tag);
      end
      n_out++;
      if (n_out == NV / 2) stress = 1;
    end
  end

  initial begin
    vals[0] = '{re: 32'sd65536, im: 32'sd0};
    vals[1] = '{re: -32'sd65536, im: 32'sd0};
    vals[2] = '{re: 32'sd0, im: 32'sd300000};
    vals[3] = '{re: 32'sd0, im: -32'sd300000};
    vals[4] = '{re: 32'sh7fff0000, im: 32'sh7fff0000};
    vals[5] = '{re: -32'sh7fff0000, im: -32'sh7fff0000};
    vals[6] = '{re: 32'sd3, im: -32'sd4};
    for (int i = 7; i < NV; i++)
      vals[i] = '{re: fx16_16_t'($urandom) >>> $urandom_range(0, 20),
                  im: fx16_16_t'($urandom) >>> $urandom_range(0, 20)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (n_out == NV);
    checks++;
    if (t_out0 - t_in0 != 18) begin
      failures++;
      $display("LATENCY %0d cycles", t_out0 - t_in0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
