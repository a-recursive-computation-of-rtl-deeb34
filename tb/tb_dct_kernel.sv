// tb_dct_kernel: self-checking test of the recursive kernel.
//
// Drives M-sample sequences with coefficients worked out here from their
// definitions (eta = cos((omega-1)pi/M), kappa = cos(omega pi/M),
// zeta = 2cos(pi/M), eps arbitrary negative) and checks out_xac against
//   eps * (-sum_m x(m) cos((m + omega) pi/M))
// twice: once tightly against the same sum evaluated in real arithmetic with
// the quantised coefficients, once loosely against the ideal cosines. It
// checks the impulse response (h(n) = cos((n+1-omega) pi/M)), random
// sequences for several omega and M, two interleaved lanes, a sequence
// restart right after another one, and the one-cycle output latency.
`timescale 1ns/1ps
module tb_dct_kernel;
  import dct_pkg::*;

  localparam int unsigned XW    = 18;
  localparam int unsigned SF    = 6;
  localparam int unsigned GB    = 2;
  localparam int unsigned EPS_F = 14;
  localparam int unsigned SW    = XW + GB + SF;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid, in_first, in_last;
  logic [0:0]           in_lane;
  logic signed [XW-1:0] x;
  coef_t                eta, kappa, eps, zeta;
  logic                 out_valid;
  logic [0:0]           out_lane;
  logic signed [SW-1:0] out_xac;

  dct_kernel #(.XW(XW), .SF(SF), .GB(GB), .EPS_F(EPS_F), .LANES(2)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q(real v, int f);
    return round_fx(v, f);
  endfunction

  // capture results as they appear, with the cycle they appeared on
  real  got_q [2];
  int   got_cycle [2];
  bit   got [2];
  always @(posedge clk) if (out_valid) begin
    got_q[out_lane]     <= real'(out_xac) / (2.0 ** SF);
    got_cycle[out_lane] <= cycle;
    got[out_lane]       <= 1'b1;
  end

  // one coefficient set per lane
  int  M_l [2];
  real om_l [2];
  coef_t eta_l [2], kappa_l [2], zeta_l [2];
  coef_t eps_c;

  task automatic set_lane(int lane, int M, real om);
    M_l[lane]     = M;
    om_l[lane]    = om;
    eta_l[lane]   = coef_t'(q($cos((om - 1.0) * PI / M), COEF_F));
    kappa_l[lane] = coef_t'(q($cos(om * PI / M), COEF_F));
    zeta_l[lane]  = coef_t'(q(2.0 * $cos(PI / M), COEF_F));
  endtask

  // reference: quantised coefficients, real arithmetic, and ideal cosines
  function automatic real ref_quant(int lane, int xs [], real ep);
    real w1 = 0, w2 = 0, w = 0, y;
    real e = real'(eta_l[lane]) / 1024.0, k = real'(kappa_l[lane]) / 1024.0;
    real z = real'(zeta_l[lane]) / 1024.0;
    for (int i = 0; i < xs.size(); i++) begin
      w  = xs[i] + z * w1 - w2;
      y  = e * w - k * w1;
      w2 = w1;
      w1 = w;
    end
    return ep * y;
  endfunction

  function automatic real ref_ideal(int lane, int xs [], real ep);
    real s = 0;
    for (int i = 0; i < xs.size(); i++)
      s += xs[i] * $cos((i + om_l[lane]) * PI / M_l[lane]);
    return -ep * s;
  endfunction

  task automatic check_result(int lane, int xs [], int last_cycle, string what);
    real ep = real'(eps_c) / (2.0 ** EPS_F);
    real rq = ref_quant(lane, xs, ep), ri = ref_ideal(lane, xs, ep);
    real mag = 0;
    foreach (xs[i]) mag += (xs[i] < 0) ? -xs[i] : xs[i];
    checks++;
    if (!got[lane]) begin
      failures++; $display("FAIL %s: no result", what);
    end else begin
      if (got_cycle[lane] != last_cycle + 1) begin
        failures++; $display("FAIL %s: latency %0d", what, got_cycle[lane] - last_cycle);
      end
      checks++;
      if ((got_q[lane] - rq) > 0.05 + 1e-4 * mag || (rq - got_q[lane]) > 0.05 + 1e-4 * mag) begin
        failures++; $display("FAIL %s: got %f quantised-ref %f", what, got_q[lane], rq);
      end
      checks++;
      if ((got_q[lane] - ri) > 0.2 + 3e-3 * mag * (-ep) || (ri - got_q[lane]) > 0.2 + 3e-3 * mag * (-ep)) begin
        failures++; $display("FAIL %s: got %f ideal-ref %f", what, got_q[lane], ri);
      end
    end
  endtask

  // run one sequence on one lane
  task automatic run_one(int lane, int xs [], string what);
    int last_cycle;
    got[lane] = 0;
    for (int i = 0; i < xs.size(); i++) begin
      in_valid <= 1; in_lane <= 1'(lane);
      in_first <= (i == 0); in_last <= (i == xs.size() - 1);
      x <= XW'(xs[i]);
      eta <= eta_l[lane]; kappa <= kappa_l[lane]; zeta <= zeta_l[lane]; eps <= eps_c;
      @(posedge clk);
      last_cycle = cycle;
    end
    in_valid <= 0; in_first <= 0; in_last <= 0;
    @(posedge clk); #1;
    check_result(lane, xs, last_cycle, what);
  endtask

  // two sequences interleaved sample by sample on lanes 0 and 1
  task automatic run_pair(int xs0 [], int xs1 [], string what);
    int last0, last1;
    got[0] = 0; got[1] = 0;
    for (int i = 0; i < xs0.size(); i++) begin
      for (int l = 0; l < 2; l++) begin
        in_valid <= 1; in_lane <= 1'(l);
        in_first <= (i == 0); in_last <= (i == xs0.size() - 1);
        x <= XW'((l == 0) ? xs0[i] : xs1[i]);
        eta <= eta_l[l]; kappa <= kappa_l[l]; zeta <= zeta_l[l]; eps <= eps_c;
        @(posedge clk);
        if (l == 0) last0 = cycle; else last1 = cycle;
      end
    end
    in_valid <= 0; in_first <= 0; in_last <= 0;
    @(posedge clk); #1;
    check_result(0, xs0, last0, {what, " lane0"});
    check_result(1, xs1, last1, {what, " lane1"});
  endtask

  initial begin
    int xs [], ys [];
    in_valid = 0; in_first = 0; in_last = 0; in_lane = 0; x = 0;
    eta = 0; kappa = 0; eps = 0; zeta = 0;
    eps_c = coef_t'(-2048);                       // eps = -1/8
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // impulse response: x = delta(m - (M-1-n)) gives eps * cos((n+1-omega)pi/M)
    set_lane(0, 8, 1.5);
    for (int n = 0; n < 8; n++) begin
      xs = new[8];
      foreach (xs[i]) xs[i] = 0;
      xs[7 - n] = 1000;
      run_one(0, xs, $sformatf("impulse n=%0d", n));
    end

    // random sequences, several omega, M = 8 and M = 4; sum |x| stays within
    // the 18-bit range, as it does for pre-added blocks
    for (int t = 0; t < 40; t++) begin
      automatic int M = (t % 4 == 3) ? 4 : 8;
      automatic real om = real'(($urandom % (2 * M)) - M + 1) / 2.0;   // (k1 +- k2)/2
      set_lane(0, M, om);
      eps_c = coef_t'(-1024 - ($urandom % 1024));
      xs = new[M];
      foreach (xs[i]) xs[i] = $signed($urandom % 32768) - 16384;
      if (t < 4) foreach (xs[i]) xs[i] = (t % 2 == 1) ? 16383 : -16384;
      run_one(0, xs, $sformatf("random t=%0d M=%0d om=%f", t, M, om));
    end

    // two lanes interleaved, different omega
    for (int t = 0; t < 10; t++) begin
      set_lane(0, 8, real'($urandom % 15) / 2.0);
      set_lane(1, 8, -real'($urandom % 15) / 2.0);
      xs = new[8]; ys = new[8];
      foreach (xs[i]) xs[i] = $signed($urandom % 8192) - 4096;
      foreach (ys[i]) ys[i] = $signed($urandom % 8192) - 4096;
      run_pair(xs, ys, $sformatf("pair t=%0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
