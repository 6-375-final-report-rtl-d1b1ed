// nav_pkg: data types and constants shared by the wearable-navigation
// accelerator blocks (point cloud, scene statistics, scene differencing and
// step rate). Widths follow the data-type tables of the design: 12-bit phase
// and confidence pixels, Q16.16 motion samples and complex FFT points, Q8.16
// coordinates and step rate, and a 2-bit illumination level. The signed
// illumination step type (-1/0/+1) is this design's own encoding.
package nav_pkg;


  typedef logic [11:0]        phase_t;       // single phase pixel, UInt#(12)
  typedef logic [11:0]        conf_t;        // single confidence pixel, UInt#(12)
  typedef logic signed [31:0] motion_t;      // IMU sample, FixedPoint#(16,16)
  typedef logic signed [23:0] fx8_16_t;      // FixedPoint#(8,16)
  typedef fx8_16_t            step_rate_t;   // step rate in Hz, FixedPoint#(8,16)
  typedef logic [1:0]         illum_t;       // illumination power level, UInt#(2)
  typedef logic signed [1:0]  illum_delta_t; // -1, 0 or +1 illumination step

  // Signed 16.16 fixed point used inside the FFT.
  typedef logic signed [31:0] fx16_16_t;

  typedef struct packed {
    fx16_16_t re;
    fx16_16_t im;
  } complex_t;

  // 3-D point cloud coordinate: X is along the optical axis, Y horizontal,
  // Z vertical, all in metres.
  typedef struct packed {
    fx8_16_t x;
    fx8_16_t y;
    fx8_16_t z;
  } coord_t;

  // One pixel of a camera frame as it arrives from the host.
  typedef struct packed {
    phase_t phase;
    conf_t  conf;
  } pixel_t;

endpackage
