// point_cloud: converts a stream of phase pixels into 3-D point-cloud
// coordinates, one coordinate per phase pixel.
//
// Pixels arrive in column-major order (y runs fastest, HEIGHT pixels per
// column, WIDTH columns per frame). Three parts, as in the design:
//  * Fetch: a pixel counter walks (x, y) over the frame independently of the
//    data, maps each location to the quadrant index PCIndex =
//    |x-W/2|*(H/2+1) + |y-H/2| and reads the normalized coordinate from the
//    lookup table (pc_coord_rom). Reads land in a small coordinate FIFO
//    together with the two sign bits of the quadrant; a credit count keeps
//    the FIFO from overflowing, so Fetch can run ahead of the data.
//  * Scale: pops a phase (input FIFO) and a coordinate together - they stay
//    paired purely by order - and computes coord = (phase * normalized) /
//    4096, i.e. phase is the fraction of one unambiguous range, then applies
//    the sign of the quadrant (Y follows x - W/2, Z follows y - H/2).
//  * The result goes to an output FIFO.
// Interface: valid/ready stream in (phase), valid/ready stream out (coord_t
// plus out_last on the final pixel of a frame). Timing: one coordinate per
// cycle once full, so a frame of 4800 pixels takes 4800 cycles plus a few
// cycles of latency (3 from input to output). FIFO depths and the
// 1/4096 phase scaling are this design's choices.
module point_cloud
  import nav_pkg::*;
#(
  parameter int unsigned WIDTH     = 80,
  parameter int unsigned HEIGHT    = 60,
  parameter real         FOV_X_DEG = 74.0,
  parameter real         FOV_Y_DEG = 59.0,
  parameter real         RANGE_M   = 2.5
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  phase_t in_phase,
  output logic   out_valid,
  input  logic   out_ready,
  output coord_t out_coord,
  output logic   out_last
);
  localparam int unsigned QH      = HEIGHT / 2 + 1;
  localparam int unsigned QDEPTH  = (WIDTH / 2 + 1) * QH;
  localparam int unsigned AW      = $clog2(QDEPTH);
  localparam int unsigned XW      = $clog2(WIDTH);
  localparam int unsigned YW      = $clog2(HEIGHT);
  localparam int unsigned CDEPTH  = 4;

  typedef struct packed {
    coord_t c;
    logic   neg_y;
    logic   neg_z;
    logic   last;
  } fetched_t;

  typedef struct packed {
    coord_t c;
    logic   last;
  } out_t;

  // ---------------- Fetch ----------------
  logic [XW-1:0] px;
  logic [YW-1:0] py;
  logic [2:0]    credits_used;   // reads issued and not yet consumed by Scale
  logic          issue;
  logic          rd_pending;
  fetched_t      pend_meta;      // signs and last flag of the read in flight
  coord_t        rom_data;

  logic [XW-1:0] dx;
  logic [YW-1:0] dy;
  logic [AW-1:0] pc_index;

  always_comb begin
    dx = (px >= XW'(WIDTH / 2))  ? px - XW'(WIDTH / 2)  : XW'(WIDTH / 2) - px;
    dy = (py >= YW'(HEIGHT / 2)) ? py - YW'(HEIGHT / 2) : YW'(HEIGHT / 2) - py;
    pc_index = AW'(dx) * AW'(QH) + AW'(dy);
  end

  logic coord_pop;
  assign issue = (credits_used < 3'(CDEPTH));

  pc_coord_rom #(
    .WIDTH(WIDTH), .HEIGHT(HEIGHT),
    .FOV_X_DEG(FOV_X_DEG), .FOV_Y_DEG(FOV_Y_DEG), .RANGE_M(RANGE_M)
  ) u_rom (
    .clk(clk), .rd_en(issue), .rd_addr(pc_index), .rd_data(rom_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      px <= '0;
      py <= '0;
      credits_used <= '0;
      rd_pending <= 1'b0;
      pend_meta <= '0;
    end else begin
      rd_pending <= issue;
      if (issue) begin
        pend_meta.neg_y <= (px < XW'(WIDTH / 2));
        pend_meta.neg_z <= (py < YW'(HEIGHT / 2));
        pend_meta.last  <= (px == XW'(WIDTH - 1)) && (py == YW'(HEIGHT - 1));
        if (py == YW'(HEIGHT - 1)) begin
          py <= '0;
          px <= (px == XW'(WIDTH - 1)) ? '0 : px + 1'b1;
        end else begin
          py <= py + 1'b1;
        end
      end
      case ({issue, coord_pop})
        2'b10:   credits_used <= credits_used + 1'b1;
        2'b01:   credits_used <= credits_used - 1'b1;
        default: credits_used <= credits_used;
      endcase
    end
  end

  fetched_t fetched_in, coord_head;
  logic     coord_valid, coord_in_ready;
  always_comb begin
    fetched_in   = pend_meta;
    fetched_in.c = rom_data;
  end

  sync_fifo #(.T(fetched_t), .DEPTH(CDEPTH)) u_coord_fifo (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rd_pending), .in_ready(coord_in_ready), .in_data(fetched_in),
    .out_valid(coord_valid), .out_ready(coord_pop), .out_data(coord_head)
  );

  // ---------------- Input phase FIFO ----------------
  logic   ph_valid, ph_pop;
  phase_t ph_head;
  sync_fifo #(.T(phase_t), .DEPTH(2)) u_in_fifo (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_phase),
    .out_valid(ph_valid), .out_ready(ph_pop), .out_data(ph_head)
  );

  // ---------------- Scale ----------------
  function automatic fx8_16_t scale(input phase_t ph, input fx8_16_t n, input logic neg);
    logic [35:0] prod;
    fx8_16_t     mag;
    prod = 36'(ph) * 36'($unsigned(n));
    mag  = fx8_16_t'(prod >> 12);
    return neg ? -mag : mag;
  endfunction

  logic out_in_ready, scale_fire;
  out_t scaled;
  assign scale_fire = ph_valid && coord_valid && out_in_ready;
  assign ph_pop     = scale_fire;
  assign coord_pop  = scale_fire;

  always_comb begin
    scaled.c.x  = scale(ph_head, coord_head.c.x, 1'b0);
    scaled.c.y  = scale(ph_head, coord_head.c.y, coord_head.neg_y);
    scaled.c.z  = scale(ph_head, coord_head.c.z, coord_head.neg_z);
    scaled.last = coord_head.last;
  end

  out_t out_head;
  sync_fifo #(.T(out_t), .DEPTH(2)) u_out_fifo (
    .clk(clk), .rst_n(rst_n),
    .in_valid(scale_fire), .in_ready(out_in_ready), .in_data(scaled),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_head)
  );
  assign out_coord = out_head.c;
  assign out_last  = out_head.last;

  a_coord_fifo_never_full: assert property (@(posedge clk) disable iff (!rst_n)
    rd_pending |-> coord_in_ready);
endmodule
