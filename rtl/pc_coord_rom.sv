// pc_coord_rom: lookup table of normalized point-cloud coordinates for one
// quadrant of the pixel plane, read like a block RAM (one registered read per
// cycle, one cycle of latency).
//
// Entry (i, j), with i = |x - WIDTH/2| and j = |y - HEIGHT/2|, holds the
// unsigned coordinate of a point seen through that pixel at a phase of 1.0
// (one full unambiguous range), from the pinhole transform:
//   u = i * tan(FOV_X / WIDTH),  v = j * tan(FOV_Y / HEIGHT)
//   X = R / sqrt(1 + u^2 + v^2),  Y = X * u,  Z = X * v
// where R is the unambiguous range in metres and the focal length is 1 (u and
// v are already tangents). The table is (WIDTH/2+1) x (HEIGHT/2+1) entries,
// index = i * (HEIGHT/2+1) + j, each three Q8.16 values. Contents are computed
// at elaboration by a constant function. Storing one quadrant and restoring
// the sign afterwards follows the design; the field of view and range values
// are this design's assumptions.
module pc_coord_rom
  import nav_pkg::*;
#(
  parameter int unsigned WIDTH     = 80,
  parameter int unsigned HEIGHT    = 60,
  parameter real         FOV_X_DEG = 74.0,
  parameter real         FOV_Y_DEG = 59.0,
  parameter real         RANGE_M   = 2.5,
  localparam int unsigned QW       = WIDTH / 2 + 1,
  localparam int unsigned QH       = HEIGHT / 2 + 1,
  localparam int unsigned DEPTH    = QW * QH,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output coord_t        rd_data
);
  typedef logic [$bits(coord_t)-1:0] table_t [DEPTH];

  localparam real PI = 3.14159265358979323846;

  function automatic fx8_16_t to_q16(input real r);
    return fx8_16_t'(longint'(r * 65536.0 + 0.5));
  endfunction

  function automatic table_t gen_table();
    table_t t;
    real du, dv, u, v, k;
    du = $tan(FOV_X_DEG * PI / 180.0 / real'(WIDTH));
    dv = $tan(FOV_Y_DEG * PI / 180.0 / real'(HEIGHT));
    for (int i = 0; i < int'(QW); i++) begin
      for (int j = 0; j < int'(QH); j++) begin
        u = real'(i) * du;
        v = real'(j) * dv;
        k = RANGE_M / $sqrt(1.0 + u * u + v * v);
        t[i * int'(QH) + j] = {to_q16(k), to_q16(k * u), to_q16(k * v)};
      end
    end
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= coord_t'(TABLE[rd_addr]);
  end
endmodule
