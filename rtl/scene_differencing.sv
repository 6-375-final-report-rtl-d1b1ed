// scene_differencing: flags frames that are nearly identical to the previous
// one, SkipFrame := sum |G(phase_i) - G(phase_{i-1})| < G_SKIP, where G is a
// K x K Gaussian low-pass filter.
//
// Pixels arrive in column-major order. The pipeline works on whole columns
// of HEIGHT pixels:
//  * Chunker: gathers HEIGHT pixels into a column and queues it (two
//    columns deep) for the window, so the input never waits at frame edges.
//  * Rolling Window: K column registers, each with a validity flag. A new
//    column shifts in (the oldest drops out) once the centre column has been
//    convolved. After the last column of a frame, K/2 invalid columns are
//    shifted in so the right edge is filtered with zeros and the next frame
//    never sees the old one.
//  * Convolve: one Gaussian output per cycle, centred on the middle column and
//    walking down it; neighbours outside the frame or in invalid columns count
//    as zero. Kernel weights are binomial, w = C(K-1, i), normalised by
//    2^(2(K-1)); the results fill the Gaussian Column register.
//  * Compare / Store: on the last convolution cycle of a column the previous
//    frame's Gaussian column is read from a column-wide RAM (WIDTH words of
//    HEIGHT*12 bits); the next cycle the sum of absolute differences (Delta)
//    of the column pair is formed and the new column is written back.
//  * Accumulate: adds the column Deltas of a frame; after the last column it
//    queues SkipFrame = (sum < G_SKIP). No result follows the first frame
//    after reset, since there is no previous frame to compare with.
// Interface: valid/ready phase stream in, valid/ready stream of SkipFrame
// flags out (one per frame from the second frame on). Timing: HEIGHT cycles
// per column and one pixel per cycle in steady state, so a frame takes
// WIDTH*HEIGHT cycles (4800 at 80x60); the flag follows about
// (K/2 + 1)*HEIGHT + 12 cycles after the frame's last pixel (132 for K = 3),
// since the last K/2 + 1 columns are still to be filtered then.
// The column pipeline follows the design; K = 3, the binomial kernel, the
// whole-column compare in one cycle and the default G_SKIP (an average of 16
// phase codes per pixel) are this design's assumptions.
module scene_differencing
  import nav_pkg::*;
#(
  parameter int unsigned WIDTH  = 80,
  parameter int unsigned HEIGHT = 60,
  parameter int unsigned K      = 3,
  parameter int unsigned G_SKIP = 76800
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  phase_t in_phase,
  output logic   out_valid,
  input  logic   out_ready,
  output logic   out_skip
);
  localparam int unsigned HALF = K / 2;
  localparam int unsigned XW   = $clog2(WIDTH);
  localparam int unsigned YW   = $clog2(HEIGHT);
  localparam int unsigned NORM = 2 * (K - 1);          // log2 of the kernel sum

  typedef phase_t column_t [HEIGHT];
  typedef logic [HEIGHT*12-1:0] packed_col_t;

  // binomial coefficient C(K-1, i)
  function automatic int unsigned binom(input int unsigned i);
    int unsigned r;
    r = 1;
    for (int unsigned j = 0; j < i; j++) r = r * (K - 1 - j) / (j + 1);
    return r;
  endfunction

  // ---------------- Chunker ----------------
  // Pixels are assembled in asm_col; the pixel that completes a column is
  // merged in on the fly and the whole column is pushed into a two-entry
  // column queue, so assembly of the next column never waits for the window.
  typedef struct packed {
    packed_col_t col;
    logic        last;            // column WIDTH-1 of its frame
  } col_entry_t;

  column_t       asm_col;
  logic [YW-1:0] asm_y;
  logic [XW-1:0] asm_x;
  logic          colq_in_ready;
  logic          colq_push;
  col_entry_t    colq_in, colq_head;

  column_t       chunk;           // column at the head of the queue
  logic          chunk_full;      // queue holds a column
  logic          chunk_last;
  logic          chunk_take;      // window takes the head column this cycle

  assign in_ready  = (asm_y != YW'(HEIGHT - 1)) || colq_in_ready;
  assign colq_push = in_valid && in_ready && (asm_y == YW'(HEIGHT - 1));

  always_comb begin
    for (int y = 0; y < int'(HEIGHT) - 1; y++) colq_in.col[y*12 +: 12] = asm_col[y];
    colq_in.col[(HEIGHT-1)*12 +: 12] = in_phase;
    colq_in.last = (asm_x == XW'(WIDTH - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      asm_y <= '0;
      asm_x <= '0;
      for (int y = 0; y < int'(HEIGHT); y++) asm_col[y] <= '0;
    end else if (in_valid && in_ready) begin
      asm_col[asm_y] <= in_phase;
      if (asm_y == YW'(HEIGHT - 1)) begin
        asm_y <= '0;
        asm_x <= (asm_x == XW'(WIDTH - 1)) ? '0 : asm_x + 1'b1;
      end else begin
        asm_y <= asm_y + 1'b1;
      end
    end
  end

  sync_fifo #(.T(col_entry_t), .DEPTH(2)) u_col_fifo (
    .clk(clk), .rst_n(rst_n),
    .in_valid(colq_push), .in_ready(colq_in_ready), .in_data(colq_in),
    .out_valid(chunk_full), .out_ready(chunk_take), .out_data(colq_head)
  );

  always_comb begin
    for (int y = 0; y < int'(HEIGHT); y++) chunk[y] = colq_head.col[y*12 +: 12];
    chunk_last = colq_head.last;
  end

  // ---------------- Rolling Window and Convolve ----------------
  column_t       win [K];
  logic [K-1:0]  win_valid;
  logic          conv_active;
  logic [YW-1:0] conv_y;
  logic [XW-1:0] conv_x;          // frame column being convolved
  int unsigned   flush_left;      // invalid columns still to shift in
  logic          adv;             // pipeline may advance (room for a result)
  logic          conv_done;       // last convolution cycle of a column
  logic          can_shift;
  logic          shift_flush;
  logic          center_after_shift;

  column_t       gcol;
  logic          cmp_pending;
  logic [XW-1:0] cmp_x;
  logic          have_prev;
  logic [31:0]   acc;

  assign conv_done  = conv_active && (conv_y == YW'(HEIGHT - 1));
  assign can_shift  = adv && (!conv_active || conv_done);
  assign shift_flush = can_shift && (flush_left != 0);
  assign chunk_take = can_shift && (flush_left == 0) && chunk_full;
  // validity of the centre column after the shift happening this cycle
  assign center_after_shift = (HALF + 1 < K) ? win_valid[HALF + 1] : chunk_take;

  // one Gaussian output, centred on win[HALF], row conv_y
  logic [23:0] gsum;
  always_comb begin
    gsum = '0;
    for (int i = 0; i < int'(K); i++) begin
      for (int j = 0; j < int'(K); j++) begin
        int yy;
        yy = int'(conv_y) + j - int'(HALF);
        if (win_valid[i] && yy >= 0 && yy < int'(HEIGHT))
          gsum = gsum + 24'(binom(i) * binom(j)) * 24'(win[i][yy]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_valid   <= '0;
      conv_active <= 1'b0;
      conv_y      <= '0;
      conv_x      <= '0;
      flush_left  <= 0;
      for (int i = 0; i < int'(K); i++)
        for (int y = 0; y < int'(HEIGHT); y++) win[i][y] <= '0;
      for (int y = 0; y < int'(HEIGHT); y++) gcol[y] <= '0;
    end else if (adv) begin
      if (conv_active) begin
        gcol[conv_y] <= phase_t'(gsum >> NORM);
        conv_y <= conv_y + 1'b1;
      end
      if (conv_done) begin
        conv_active <= 1'b0;
        conv_x <= (conv_x == XW'(WIDTH - 1)) ? '0 : conv_x + 1'b1;
      end
      if (chunk_take || shift_flush) begin
        for (int i = 0; i + 1 < int'(K); i++) begin
          win[i] <= win[i + 1];
          win_valid[i] <= win_valid[i + 1];
        end
        win[K - 1] <= chunk;
        win_valid[K - 1] <= chunk_take;
        if (chunk_take && chunk_last) flush_left <= HALF;
        else if (shift_flush) flush_left <= flush_left - 1;
        conv_y <= '0;
        conv_active <= center_after_shift;
      end
    end
  end

  // ---------------- previous-frame Gaussian columns (RAM) ----------------
  packed_col_t prev_mem [WIDTH];
  packed_col_t prev_rd;
  packed_col_t gcol_packed;

  always_comb begin
    for (int y = 0; y < int'(HEIGHT); y++) gcol_packed[y*12 +: 12] = gcol[y];
  end

  always_ff @(posedge clk) begin
    if (adv && conv_done) prev_rd <= prev_mem[conv_x];          // request
    if (adv && cmp_pending) prev_mem[cmp_x] <= gcol_packed;      // Store
  end

  // ---------------- Compare and Accumulate ----------------
  logic [31:0] delta;
  always_comb begin
    delta = '0;
    for (int y = 0; y < int'(HEIGHT); y++) begin
      logic [11:0] a, b;
      a = gcol[y];
      b = prev_rd[y*12 +: 12];
      delta = delta + ((a > b) ? 32'(a) - 32'(b) : 32'(b) - 32'(a));
    end
  end

  logic res_valid, res_ready, res_skip;
  assign adv = res_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmp_pending <= 1'b0;
      cmp_x       <= '0;
      have_prev   <= 1'b0;
      acc         <= '0;
      res_valid   <= 1'b0;
      res_skip    <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      if (adv) begin
        cmp_pending <= conv_done;
        cmp_x       <= conv_x;
        if (cmp_pending) begin
          if (cmp_x == XW'(WIDTH - 1)) begin
            acc       <= '0;
            have_prev <= 1'b1;
            res_valid <= have_prev;
            res_skip  <= (acc + delta) < 32'(G_SKIP);
          end else begin
            acc <= acc + delta;
          end
        end
      end
    end
  end

  // Output queue. The pipeline holds while it has fewer than two free slots,
  // so the single-cycle result pulse always finds room.
  logic [1:0] out_count;
  logic       out_push_ok;
  sync_fifo #(.T(logic), .DEPTH(3)) u_out_fifo (
    .clk(clk), .rst_n(rst_n),
    .in_valid(res_valid), .in_ready(out_push_ok), .in_data(res_skip),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_skip)
  );
  always_ff @(posedge clk) begin
    if (!rst_n) out_count <= '0;
    else out_count <= out_count + 2'(res_valid) - 2'(out_valid && out_ready);
  end
  assign res_ready = (out_count < 2'd2);

  a_result_has_room: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid |-> out_push_ok);
endmodule
