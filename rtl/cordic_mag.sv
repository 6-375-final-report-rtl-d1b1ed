// cordic_mag: magnitude of a complex value with a CORDIC in vectoring mode.
//
// The vector is first folded into the right half-plane (x = |re|, y = im),
// then ITER micro-rotations by +/- atan(2^-i) drive y to zero:
//   y > 0:  x += y >> i, y -= x >> i     else:  x -= y >> i, y += x >> i
// after which x holds the magnitude times the CORDIC gain (about 1.6468).
// The gain is removed by a final multiply with 0.60725 (Q16), so the output
// is the true magnitude in the input's own fixed-point format.
// Each micro-rotation is one pipeline stage: one input per cycle, ITER + 1
// cycles of latency. The pipeline advances when its last stage is empty or
// being read (in_ready = out_ready || !out_valid), with a valid bit per stage
// and a pass-through tag (TAGW bits) for the caller's bookkeeping.
// Using a CORDIC for the magnitude follows the design; the pipelined form,
// ITER = 16 and the gain correction are this design's choices.
module cordic_mag
  import nav_pkg::*;
#(
  parameter int unsigned ITER = 16,
  parameter int unsigned TAGW = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  complex_t        in_data,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [33:0]     out_mag,
  output logic [TAGW-1:0] out_tag
);
  localparam int unsigned XW = 36;            // room for |z| * 1.65 of a 32-bit input
  localparam logic [16:0] INV_GAIN = 17'd39797; // round(0.607253 * 65536)

  typedef logic signed [XW-1:0] acc_t;

  acc_t            x [ITER + 1];
  acc_t            y [ITER + 1];
  logic [TAGW-1:0] tag [ITER + 1];
  logic            v [ITER + 2];
  logic [33:0]     mag_q;
  logic [TAGW-1:0] tag_q;
  logic            adv;

  assign adv       = out_ready || !v[ITER + 1];
  assign in_ready  = adv;
  assign out_valid = v[ITER + 1];
  assign out_mag   = mag_q;
  assign out_tag   = tag_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i <= int'(ITER) + 1; i++) v[i] <= 1'b0;
    end else if (adv) begin
      v[0] <= in_valid;
      for (int i = 1; i <= int'(ITER) + 1; i++) v[i] <= v[i - 1];
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      // stage 0: fold into the right half-plane
      x[0]   <= (in_data.re < 0) ? -acc_t'(in_data.re) : acc_t'(in_data.re);
      y[0]   <= acc_t'(in_data.im);
      tag[0] <= in_tag;
      for (int i = 0; i < int'(ITER); i++) begin
        if (y[i] > 0) begin
          x[i + 1] <= x[i] + (y[i] >>> i);
          y[i + 1] <= y[i] - (x[i] >>> i);
        end else begin
          x[i + 1] <= x[i] - (y[i] >>> i);
          y[i + 1] <= y[i] + (x[i] >>> i);
        end
        tag[i + 1] <= tag[i];
      end
      // gain correction; the upper product bits are zero as |z| < 2^32
      mag_q <= 34'(($unsigned(x[ITER]) * (XW+17)'(INV_GAIN)) >> 16);
      tag_q <= tag[ITER];
    end
  end
endmodule
