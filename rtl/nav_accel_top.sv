// nav_accel_top: the hardware half of a power-aware wearable navigation aid.
// A time-of-flight camera delivers 80x60 frames of phase (distance) and
// confidence pixels; an IMU delivers vertical acceleration. Four independent
// engines turn these into a 3-D point cloud and into the three signals a host
// camera controller uses to scale camera power:
//  * point_cloud        - one (X, Y, Z) coordinate per phase pixel
//  * scene_differencing - SkipFrame: the frame barely differs from the last
//  * scene_statistics   - illumination step (-1 / 0 / +1) per frame
//  * step_rate          - the wearer's step frequency from the IMU
// The pixel stream (column-major, one pixel per transfer) is broadcast to the
// three camera engines: a pixel is taken only when all three can take it
// (in_ready is the AND of their readies), so they stay in frame lock. The IMU
// stream goes to step_rate alone. Every output is a valid/ready stream for
// the host. The controller that closes the loop (frame rate and illumination
// updates) runs on the host and is not part of this hardware.
// Timing: all camera engines take one pixel per cycle, so an 80x60 frame
// streams in 4800 cycles; step rate results follow about 660 cycles after the
// last sample of each 128-sample window.
module nav_accel_top
  import nav_pkg::*;
#(
  parameter int unsigned WIDTH  = 80,
  parameter int unsigned HEIGHT = 60,
  parameter int unsigned FFT_N  = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  // camera pixel stream
  input  logic         pix_valid,
  output logic         pix_ready,
  input  pixel_t       pix_data,
  // point cloud output
  output logic         pc_valid,
  input  logic         pc_ready,
  output coord_t       pc_coord,
  output logic         pc_last,
  // SkipFrame flags
  output logic         skip_valid,
  input  logic         skip_ready,
  output logic         skip_frame,
  // illumination steps
  output logic         illum_valid,
  input  logic         illum_ready,
  output illum_delta_t illum_delta,
  // IMU samples and step rate
  input  logic         imu_valid,
  output logic         imu_ready,
  input  motion_t      imu_sample,
  output logic         rate_valid,
  input  logic         rate_ready,
  output step_rate_t   rate
);
  logic pc_in_ready, st_in_ready, sd_in_ready;

  assign pix_ready = pc_in_ready && st_in_ready && sd_in_ready;

  point_cloud #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_point_cloud (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pix_valid && st_in_ready && sd_in_ready), .in_ready(pc_in_ready),
    .in_phase(pix_data.phase),
    .out_valid(pc_valid), .out_ready(pc_ready), .out_coord(pc_coord), .out_last(pc_last)
  );

  scene_statistics #(.FRAME_PIX(WIDTH * HEIGHT)) u_scene_statistics (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pix_valid && pc_in_ready && sd_in_ready), .in_ready(st_in_ready),
    .in_pixel(pix_data),
    .out_valid(illum_valid), .out_ready(illum_ready), .out_delta(illum_delta)
  );

  scene_differencing #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_scene_differencing (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pix_valid && pc_in_ready && st_in_ready), .in_ready(sd_in_ready),
    .in_phase(pix_data.phase),
    .out_valid(skip_valid), .out_ready(skip_ready), .out_skip(skip_frame)
  );

  step_rate #(.N(FFT_N)) u_step_rate (
    .clk(clk), .rst_n(rst_n),
    .in_valid(imu_valid), .in_ready(imu_ready), .in_sample(imu_sample),
    .out_valid(rate_valid), .out_ready(rate_ready), .out_rate(rate)
  );
endmodule
