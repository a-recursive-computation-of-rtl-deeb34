// dct2d_recursive: N x N 2-D DCT computed by cosine-only recursive kernels.
//
// The 2-D DCT
//   X(k1,k2) = (2/N) u(k1) u(k2) sum_{n1,n2} x(n1,n2)
//              cos((2n1+1)k1 pi/(2N)) cos((2n2+1)k2 pi/(2N))
// is computed one coefficient at a time, with no row-column transposition:
// the block is folded into the two sequences x_a(m), x_s(m) (dct_preadd). Then
// two second-order recursions of N (or fewer) steps (dct_kernel), run by Architecture-1
// (dct_arch1, two kernels) or Architecture-2 (dct_arch2, one shared kernel),
// give X(k1,k2) = eps * (Y_a + Y_s). The coefficients come from dct_coeff_rom.
// The recursion and the two architectures are the source's. The block buffer,
// the sequencer and the stream interface around them are this design's own.
//
// Operation: the block is taken in raster order (n1 rows, n2 columns), one
// pixel per in_valid && in_ready, into an N*N register buffer. The sequencer
// then steps through (k1,k2) in raster order and, for each, through
// m = 0 .. M-1 (see below), presenting the pre-added pair x_a(m), x_s(m) and the
// coefficient set to the architecture. As soon as the last pair of the block
// has been handed over, in_ready rises again and the next block can load while
// the last results drain. Results leave in raster order of (k1,k2) with
// out_valid (no back-pressure), tagged with out_k1/out_k2. Values outside
// OUT_W bits are clamped, and out_sat marks them.
//
// Sequence length: with CASE2 = 0 (the default) every coefficient uses M = N
// samples. With CASE2 = 1, a coefficient whose k1, k2 and N share a factor g
// uses only M = N/g samples (the source's "Case 2" shortening), which cuts
// the 512 recursion steps of an 8x8 block to 439.
//
// Timing: loading takes N*N cycles per block. Computing takes M cycles per
// coefficient with ARCH = 1 and 2M cycles with ARCH = 2, so N^3 or 2N^3
// cycles per block when CASE2 = 0. Add the 3 or 4 cycle pipeline latency of
// the architecture.
module dct2d_recursive
  import dct_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 12,
  parameter int unsigned SF    = 6,
  parameter int unsigned ARCH  = 1,
  parameter bit          CASE2 = 1'b0,
  localparam int unsigned KW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned XW   = IN_W + 2 * KW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // pixel input, raster order
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_pixel,
  // coefficient output, raster order of (k1,k2)
  output logic                    out_valid,
  output logic [KW-1:0]           out_k1,
  output logic [KW-1:0]           out_k2,
  output logic signed [OUT_W-1:0] out_x,
  output logic                    out_sat
);

  typedef enum logic {S_LOAD, S_RUN} state_t;

  state_t                  state;
  logic signed [IN_W-1:0]  blk [N*N];
  logic [2*KW-1:0]         ld_idx;
  logic [KW-1:0]           k1, k2, m;
  logic [KW:0]             fold, seq_len;

  logic                    a_valid, a_ready, a_first, a_last, a_take;
  logic signed [XW-1:0]    xa, xs;
  coef_set_t               coef;

  assign in_ready = (state == S_LOAD);
  assign a_valid  = (state == S_RUN);
  assign a_first  = (m == '0);
  assign a_last   = ((KW+1)'(m) == seq_len - 1'b1);
  assign a_take   = a_valid && a_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      ld_idx <= '0;
      k1     <= '0;
      k2     <= '0;
      m      <= '0;
      for (int i = 0; i < N * N; i++) blk[i] <= '0;
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          blk[ld_idx] <= in_pixel;
          if (ld_idx == (2*KW)'(N * N - 1)) begin
            ld_idx <= '0;
            state  <= S_RUN;
          end else begin
            ld_idx <= ld_idx + 1'b1;
          end
        end
        S_RUN: if (a_take) begin
          if (!a_last) begin
            m <= m + 1'b1;
          end else begin
            m <= '0;
            if (k2 != KW'(N - 1)) begin
              k2 <= k2 + 1'b1;
            end else begin
              k2 <= '0;
              if (k1 != KW'(N - 1)) begin
                k1 <= k1 + 1'b1;
              end else begin
                k1    <= '0;
                state <= S_LOAD;
              end
            end
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  dct_preadd #(.N(N), .IN_W(IN_W)) u_preadd (
    .blk, .k1, .k2, .m, .g(fold), .xa, .xs
  );

  dct_coeff_rom #(.N(N), .CASE2(CASE2)) u_coeff (
    .k1, .k2, .coef, .fold, .seq_len
  );

  generate
    if (ARCH == 2) begin : g_arch2
      dct_arch2 #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W), .SF(SF)) u_arch (
        .clk, .rst_n,
        .in_valid(a_valid), .in_ready(a_ready), .in_first(a_first), .in_last(a_last),
        .xa, .xs, .coef,
        .out_valid, .out_x, .out_sat
      );
    end else begin : g_arch1
      dct_arch1 #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W), .SF(SF)) u_arch (
        .clk, .rst_n,
        .in_valid(a_valid), .in_ready(a_ready), .in_first(a_first), .in_last(a_last),
        .xa, .xs, .coef,
        .out_valid, .out_x, .out_sat
      );
    end
  endgenerate

  // output tags: results leave in the order they were started
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_k1 <= '0;
      out_k2 <= '0;
    end else if (out_valid) begin
      if (out_k2 != KW'(N - 1)) begin
        out_k2 <= out_k2 + 1'b1;
      end else begin
        out_k2 <= '0;
        out_k1 <= (out_k1 == KW'(N - 1)) ? '0 : out_k1 + 1'b1;
      end
    end
  end

endmodule
