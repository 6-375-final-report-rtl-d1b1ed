// fft_superfolded: N-point radix-2 FFT built around a single butterfly
// ("superfolded"), using the constant-geometry Pease/Singleton ordering so
// that every stage reads and writes the data the same way.
//
// Operation, one frame at a time:
//  1. LOAD: N complex samples are accepted in natural order into bank A.
//  2. COMPUTE: log2(N) stages of N/2 cycles. In cycle j of stage s the
//     butterfly reads a = x[j] and b = x[j + N/2] from the source bank and
//     writes x'[2j] = a + b and x'[2j+1] = (a - b) * W_N^k, k = (j >> s) << s,
//     into the other bank; the banks swap roles every stage.
//     The butterfly is pipelined in two steps: read, add/subtract and
//     twiddle lookup, then a register, then the complex multiply and the
//     write-back. Stages follow each other with no gap: butterfly j of
//     stage s+1 needs words written by butterflies j/2 and j/2 + N/4 of
//     stage s, which are written at least N/4 cycles earlier, so a
//     write-back one cycle late is never read too soon.
//  3. UNLOAD: the result, which ends up in bit-reversed order, is read out in
//     natural bin order 0..N-1 (bin i is taken from address bitrev(i)).
// Data are signed Q16.16 (Complex#(FixedPoint#(16,16))) with no per-stage
// scaling: the inputs must stay below 2^15 / N in magnitude. Twiddles are
// Q2.16 values computed at elaboration with $cos/$sin. Products are
// truncated toward minus infinity.
// Interface: valid/ready stream of complex_t in (N per frame), valid/ready
// stream of complex_t out with out_bin and out_last. Timing: N cycles to load,
// log2(N)*N/2 + 1 cycles to compute (449 for N = 128), N cycles to unload.
// The single pipelined butterfly and the Pease ordering follow the design;
// the depth of the butterfly pipeline, the two register banks, the fixed-point handling and the streaming interface are
// this design's choices.
module fft_superfolded
  import nav_pkg::*;
#(
  parameter int unsigned N = 128,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  complex_t        in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output complex_t        out_data,
  output logic [LOGN-1:0] out_bin,
  output logic            out_last
);
  localparam int unsigned HALF = N / 2;
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [17:0] tw_t;                  // Q2.16 twiddle part
  typedef logic [35:0] tw_pair_t;                    // {cos, -sin}
  typedef tw_pair_t tw_table_t [HALF];

  function automatic tw_table_t gen_twiddles();
    tw_table_t t;
    for (int k = 0; k < int'(HALF); k++) begin
      tw_t c, s;
      c = tw_t'(longint'($floor($cos(2.0 * PI * k / N) * 65536.0 + 0.5)));
      s = tw_t'(longint'($floor(-$sin(2.0 * PI * k / N) * 65536.0 + 0.5)));
      t[k] = {c, s};
    end
    return t;
  endfunction

  localparam tw_table_t TWIDDLE = gen_twiddles();

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] v);
    logic [LOGN-1:0] r;
    for (int i = 0; i < int'(LOGN); i++) r[i] = v[LOGN - 1 - i];
    return r;
  endfunction

  typedef enum logic [1:0] {LOAD, COMPUTE, DRAIN, UNLOAD} state_t;
  state_t state;

  complex_t bank_a [N];
  complex_t bank_b [N];
  logic            src_is_a;     // during COMPUTE: bank A is the source
  logic [LOGN-1:0] idx;          // load/unload index
  logic [LOGN-2:0] bf_j;         // butterfly index within a stage
  logic [$clog2(LOGN+1)-1:0] stage;

  // ---------------- butterfly ----------------
  // step 1 (combinational from the banks): read, add/subtract, twiddle
  complex_t a, b, sum, diff;
  logic [LOGN-2:0] tw_k;
  // step 1 -> step 2 register
  logic            p_v;          // a butterfly is in step 2
  logic            p_to_b;       // step 2 writes bank B
  logic [LOGN-2:0] p_j;
  complex_t        p_sum, p_diff;
  tw_t             p_w_re, p_w_im;
  // step 2: complex multiply
  complex_t prod;

  function automatic fx16_16_t mul_q16(input fx16_16_t x, input tw_t w);
    logic signed [49:0] p;
    p = 50'(x) * 50'(w);
    return fx16_16_t'(p >>> 16);
  endfunction

  always_comb begin
    a = src_is_a ? bank_a[{1'b0, bf_j}] : bank_b[{1'b0, bf_j}];
    b = src_is_a ? bank_a[{1'b1, bf_j}] : bank_b[{1'b1, bf_j}];
    tw_k = (bf_j >> stage) << stage;
    sum.re  = a.re + b.re;
    sum.im  = a.im + b.im;
    diff.re = a.re - b.re;
    diff.im = a.im - b.im;
    prod.re = mul_q16(p_diff.re, p_w_re) - mul_q16(p_diff.im, p_w_im);
    prod.im = mul_q16(p_diff.re, p_w_im) + mul_q16(p_diff.im, p_w_re);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_v <= 1'b0;
    end else begin
      p_v <= (state == COMPUTE);
    end
    p_to_b <= src_is_a;
    p_j    <= bf_j;
    p_sum  <= sum;
    p_diff <= diff;
    {p_w_re, p_w_im} <= TWIDDLE[tw_k];
  end

  // result of the last stage lies in bank A when LOGN is even, else bank B
  localparam logic RESULT_IN_A = (LOGN % 2 == 0);
  complex_t unload_word;
  assign unload_word = RESULT_IN_A ? bank_a[bitrev(idx)] : bank_b[bitrev(idx)];

  assign in_ready  = (state == LOAD);
  assign out_valid = (state == UNLOAD);
  assign out_data  = unload_word;
  assign out_bin   = idx;
  assign out_last  = (idx == LOGN'(N - 1));

  always_ff @(posedge clk) begin
    if (state == LOAD && in_valid) bank_a[idx] <= in_data;
    if (p_v) begin
      if (p_to_b) begin
        bank_b[{p_j, 1'b0}] <= p_sum;
        bank_b[{p_j, 1'b1}] <= prod;
      end else begin
        bank_a[{p_j, 1'b0}] <= p_sum;
        bank_a[{p_j, 1'b1}] <= prod;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= LOAD;
      idx      <= '0;
      bf_j     <= '0;
      stage    <= '0;
      src_is_a <= 1'b1;
    end else begin
      case (state)
        LOAD: if (in_valid) begin
          idx <= idx + 1'b1;
          if (idx == LOGN'(N - 1)) begin
            state    <= COMPUTE;
            bf_j     <= '0;
            stage    <= '0;
            src_is_a <= 1'b1;
          end
        end
        COMPUTE: begin
          bf_j <= bf_j + 1'b1;
          if (bf_j == (LOGN-1)'(HALF - 1)) begin
            src_is_a <= !src_is_a;
            if (stage == ($bits(stage))'(LOGN - 1)) begin
              state <= DRAIN;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        DRAIN: begin             // last butterfly leaves step 2
          state <= UNLOAD;
          idx   <= '0;
        end
        UNLOAD: if (out_ready) begin
          idx <= idx + 1'b1;
          if (idx == LOGN'(N - 1)) state <= LOAD;
        end
        default: state <= LOAD;
      endcase
    end
  end
endmodule
