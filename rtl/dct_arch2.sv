// dct_arch2: Architecture-2, one recursive kernel shared by time division.
//
// X_ac1 and X_ac2 differ only in their input stream (x_a or x_s) and in two
// coefficients ((alpha,gamma) or (beta,delta)), so a single dct_kernel computes
// both. Each recursion step takes two phases. A small control flip-flop
// selects the phase. Multiplexers then apply x_a, alpha and gamma in the
// first phase and x_s, beta and delta in the second. A demultiplexer on the
// kernel output keeps X_ac1 until X_ac2 arrives, and the two are added.
// This is the source's structure.
//
// The source runs the two phases in the two halves of one clock period.
// This design keeps a single clock edge: each phase is one clock cycle, so a
// sample pair occupies the datapath for two clocks. The kernel keeps one pair
// of z^-1 registers per phase (LANES = 2), so the two interleaved recursions
// do not disturb each other. The coefficient set is registered together with
// the samples. Rounding and clamping of the sum are as in dct_arch1.
//
// Interface and timing: in_ready is high when the input registers are free,
// that is one cycle in two while a stream is running. A sample pair is
// taken when in_valid && in_ready. If in_valid is held without in_ready, the
// same values must stay on the inputs. X appears with out_valid 4 clocks after
// the cycle that took the in_last sample pair: the x_a phase, the x_s phase,
// the kernel output register and the adder register.
module dct_arch2
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

  // input registers and phase control
  logic                 v_r, first_r, last_r;
  logic                 phase;      // 0: x_a phase, 1: x_s phase
  logic signed [XW-1:0] xa_r, xs_r;
  coef_set_t            coef_r;
  logic                 take;

  assign in_ready = !v_r || phase;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_r     <= 1'b0;
      phase   <= 1'b0;
      first_r <= 1'b0;
      last_r  <= 1'b0;
      xa_r    <= '0;
      xs_r    <= '0;
      coef_r  <= '0;
    end else begin
      if (take) begin
        v_r     <= 1'b1;
        phase   <= 1'b0;
        first_r <= in_first;
        last_r  <= in_last;
        xa_r    <= xa;
        xs_r    <= xs;
        coef_r  <= coef;
      end else if (v_r) begin
        if (phase) v_r <= 1'b0;
        phase <= !phase;
      end
    end
  end

  // input multiplexers
  logic signed [XW-1:0] k_x;
  coef_t                k_eta, k_kappa;
  always_comb begin
    k_x     = phase ? xs_r         : xa_r;
    k_eta   = phase ? coef_r.beta  : coef_r.alpha;
    k_kappa = phase ? coef_r.delta : coef_r.gamma;
  end

  logic                 k_valid;
  logic [0:0]           k_lane;
  logic signed [SW-1:0] k_xac;

  dct_kernel #(.XW(XW), .SF(SF), .GB(GB), .EPS_F(EPS_F), .LANES(2)) u_kernel (
    .clk, .rst_n,
    .in_valid(v_r), .in_lane(phase), .in_first(first_r), .in_last(last_r),
    .x(k_x), .eta(k_eta), .kappa(k_kappa), .eps(coef_r.eps), .zeta(coef_r.zeta),
    .out_valid(k_valid), .out_lane(k_lane), .out_xac(k_xac)
  );

  // output demultiplexer and adder
  logic signed [SW-1:0] xac1_r;
  logic signed [63:0]   sum, rnd, clamped;
  always_comb begin
    sum     = 64'(xac1_r) + 64'(k_xac);
    rnd     = round_shift(sum, SF);
    clamped = saturate(rnd, OUT_W);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xac1_r    <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_sat   <= 1'b0;
    end else begin
      out_valid <= k_valid && (k_lane == 1'b1);
      if (k_valid && k_lane == 1'b0) xac1_r <= k_xac;
      if (k_valid && k_lane == 1'b1) begin
        out_x   <= OUT_W'(clamped);
        out_sat <= (clamped != rnd);
      end
    end
  end

  // handshake rule: an offered sample pair is held until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && !in_ready |=> in_valid && $stable(xa) && $stable(xs))
    else $error("dct_arch2: input changed while not ready");

endmodule
