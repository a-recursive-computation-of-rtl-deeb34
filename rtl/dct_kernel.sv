// dct_kernel: the recursive 1-D DCT block (cosine-only recursive kernel).
//
// For one output it consumes the M samples x(0..M-1) of a condensed 1-D
// sequence and evaluates
//     Y = sum_m x(m) cos((M - m - omega) pi/M) = -sum_m x(m) cos((m + omega) pi/M)
// with the second-order recursion of the source's kernel:
//     w(m)  = x(m) + zeta*w(m-1) - w(m-2)          zeta  = 2cos(pi/M)
//     y(m)  = eta*w(m) - kappa*w(m-1)              eta   = cos((omega-1) pi/M)
//                                                  kappa = cos(omega pi/M)
//     X_ac  = eps * y(M-1)                         eps   = -u(k1)u(k2)/N
// i.e. the transfer function (eta - kappa z^-1)/(1 - zeta z^-1 + z^-2):
// four multipliers and three adders, two z^-1 registers. This structure and
// the coefficient names follow the source; the number formats, the framing
// signals and the output register are this design's.
//
// Time sharing: LANES independent recursions can be interleaved sample by
// sample. Each lane has its own pair of z^-1 registers, selected by in_lane.
// Architecture-1 uses LANES = 1, Architecture-2 uses LANES = 2 (x_a and x_s).
//
// Interface and timing:
//   in_valid  one sample x of lane in_lane is presented this cycle
//   in_first  first sample of the lane's sequence: the lane's z^-1 registers
//             are read as zero (the recursion starts from rest)
//   in_last   last sample: the result of this cycle is registered and appears
//             on out_xac with out_valid one clock later
//   x         signed integer sample, XW bits
//   eta, kappa, zeta use dct_pkg::COEF_F fraction bits, eps uses EPS_F.
//   out_xac   signed, SF fraction bits.
// The recursion state keeps SF fraction bits; products are truncated back to
// SF fraction bits (floor), the output product is rounded.
module dct_kernel
  import dct_pkg::*;
#(
  parameter int unsigned XW    = 18,          // input sample width
  parameter int unsigned SF    = 6,           // fraction bits of the state
  parameter int unsigned GB    = 2,           // guard bits for the recursion gain
  parameter int unsigned EPS_F = 14,          // fraction bits of eps
  parameter int unsigned LANES = 1,
  localparam int unsigned SW   = XW + GB + SF, // state width
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [LW-1:0]        in_lane,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic signed [XW-1:0] x,
  input  coef_t                eta,
  input  coef_t                kappa,
  input  coef_t                eps,
  input  coef_t                zeta,
  output logic                 out_valid,
  output logic [LW-1:0]        out_lane,
  output logic signed [SW-1:0] out_xac
);

  localparam int unsigned PW = SW + COEF_W;   // full product width

  logic signed [SW-1:0] z1 [LANES];            // w(m-1) of each lane
  logic signed [SW-1:0] z2 [LANES];            // w(m-2) of each lane

  logic signed [SW-1:0] z1c, z2c, xs, w;
  logic signed [PW-1:0] p_zeta, p_eta, p_kappa;
  logic signed [PW:0]   y;
  logic signed [63:0]   p_eps;

  always_comb begin
    z1c     = in_first ? '0 : z1[in_lane];
    z2c     = in_first ? '0 : z2[in_lane];
    xs      = SW'(x) <<< SF;
    p_zeta  = PW'(zeta) * PW'(z1c);
    w       = xs + SW'(p_zeta >>> COEF_F) - z2c;
    p_eta   = PW'(eta) * PW'(w);
    p_kappa = PW'(kappa) * PW'(z1c);
    y       = (PW+1)'(p_eta) - (PW+1)'(p_kappa);
    p_eps   = 64'(y >>> COEF_F) * 64'(eps);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        z1[l] <= '0;
        z2[l] <= '0;
      end
      out_valid <= 1'b0;
      out_lane  <= '0;
      out_xac   <= '0;
    end else begin
      out_valid <= in_valid && in_last;
      if (in_valid) begin
        z1[in_lane] <= w;
        z2[in_lane] <= z1c;
        if (in_last) begin
          out_lane <= in_lane;
          out_xac  <= SW'(round_shift(p_eps, EPS_F));
        end
      end
    end
  end

endmodule
