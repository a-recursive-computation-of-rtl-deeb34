// dct_arch1: Architecture-1, two recursive kernels working in parallel.
//
// The x_a(m) and x_s(m) sample streams of one output X(k1,k2) are captured in
// input registers (the D flip-flops in front of the kernels) and run through
// two identical dct_kernel instances: one with eta = alpha, kappa = gamma
// (giving X_ac1), the other with eta = beta, kappa = delta (giving X_ac2).
// Both use the shared eps and zeta. The two results are added to give
// X(k1,k2). This mapping follows the source. This design's own choices are:
// the coefficient set is registered together with the samples, so every
// kernel cycle sees a matched set; the sum is rounded to an integer; and the
// result is clamped to OUT_W bits (out_sat flags a clamped value).
//
// Interface and timing: one sample pair per clock. in_ready is always 1.
// in_first/in_last frame the M = N samples of one output. X appears with
// out_valid 3 clocks after the cycle that presented the in_last sample:
// the input register, the kernel output register and the adder register.
module dct_arch1
  import dct_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 12,
  parameter int unsigned SF    = 6,
  localparam int unsigned KW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned XW   = IN_W + 2 * KW,
  localparam int unsigned EPS_F = COEF_W - 1 + KW,
  localparam int unsigned GB   = 2,
  localparam int unsigned SW   = XW + GB + SF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic                    in_first,
  input  logic                    in_last,
  input  logic signed [XW-1:0]    xa,
  input  logic signed [XW-1:0]    xs,
  input  coef_set_t               coef,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_x,
  output logic                    out_sat
);

  // input registers
  logic                 v_r, first_r, last_r;
  logic signed [XW-1:0] xa_r, xs_r;
  coef_set_t            coef_r;

  assign in_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r     <= 1'b0;
      first_r <= 1'b0;
      last_r  <= 1'b0;
      xa_r    <= '0;
      xs_r    <= '0;
      coef_r  <= '0;
    end else begin
      v_r <= in_valid;
      if (in_valid) begin
        first_r <= in_first;
        last_r  <= in_last;
        xa_r    <= xa;
        xs_r    <= xs;
        coef_r  <= coef;
      end
    end
  end

  logic                 v1, v2;
  logic [0:0]           lane1, lane2;
  logic signed [SW-1:0] xac1, xac2;

  dct_kernel #(.XW(XW), .SF(SF), .GB(GB), .EPS_F(EPS_F), .LANES(1)) u_kernel_a (
    .clk, .rst_n,
    .in_valid(v_r), .in_lane(1'b0), .in_first(first_r), .in_last(last_r),
    .x(xa_r), .eta(coef_r.alpha), .kappa(coef_r.gamma), .eps(coef_r.eps), .zeta(coef_r.zeta),
    .out_valid(v1), .out_lane(lane1), .out_xac(xac1)
  );

  dct_kernel #(.XW(XW), .SF(SF), .GB(GB), .EPS_F(EPS_F), .LANES(1)) u_kernel_s (
    .clk, .rst_n,
    .in_valid(v_r), .in_lane(1'b0), .in_first(first_r), .in_last(last_r),
    .x(xs_r), .eta(coef_r.beta), .kappa(coef_r.delta), .eps(coef_r.eps), .zeta(coef_r.zeta),
    .out_valid(v2), .out_lane(lane2), .out_xac(xac2)
  );

  // output adder: X = X_ac1 + X_ac2, rounded to an integer and clamped
  logic signed [63:0] sum, rnd, clamped;
  always_comb begin
    sum     = 64'(xac1) + 64'(xac2);
    rnd     = round_shift(sum, SF);
    clamped = saturate(rnd, OUT_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        out_x   <= OUT_W'(clamped);
        out_sat <= (clamped != rnd);
      end
    end
  end

  // both kernels see the same framing, so their results arrive together
  assert property (@(posedge clk) disable iff (!rst_n) v1 == v2)
    else $error("dct_arch1: kernel outputs out of step");

endmodule
