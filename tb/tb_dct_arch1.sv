// tb_dct_arch1: self-checking test of Architecture-1 (two kernels).
//
// For random 8x8 blocks the testbench forms x_a(m), x_s(m) itself from their
// definition and works out the kernel coefficients from their cosine formulas.
// It streams all 64 coefficients back to back, one sample pair per clock, and
// compares every X(k1,k2) with the 2-D DCT evaluated directly from its
// definition, rounded and clamped to 12 bits (tolerance 2 LSB plus a
// share that grows with the block's magnitude). It also checks
// that each result appears a fixed 3 clocks after its last sample, that the
// stream is never stalled, and that out_sat flags clamped results (a
// full-scale block drives X(0,0) out of range).
`timescale 1ns/1ps
module tb_dct_arch1;
  import dct_pkg::*;

  localparam int unsigned N       = 8;
  localparam int unsigned IN_W    = 12;
  localparam int unsigned OUT_W   = 12;
  localparam int unsigned KW      = 3;
  localparam int unsigned XW      = IN_W + 2 * KW;
  localparam int unsigned LATENCY = 3;    // clocks from the last sample taken to out_valid
  localparam int unsigned STEP    = 1;    // clocks per sample pair

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    in_valid, in_ready, in_first, in_last;
  logic signed [XW-1:0]    xa, xs;
  coef_set_t               coef;
  logic                    out_valid, out_sat;
  logic signed [OUT_W-1:0] out_x;

  dct_arch1 #(.N(N), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, n_sat = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int blk [N*N];

  function automatic int fold(int kk1, int kk2, int mm, bit diff);
    int s = 0;
    for (int n1 = 0; n1 < N; n1++)
      for (int n2 = 0; n2 < N; n2++) begin
        automatic int qq = diff ? n1 * kk1 - n2 * kk2 + 2 * N * N : n1 * kk1 + n2 * kk2;
        if (qq % N == mm) s += ((qq / N) % 2 == 0) ? blk[n1*N+n2] : -blk[n1*N+n2];
      end
    return s;
  endfunction

  function automatic real dct_ref(int kk1, int kk2);
    real s = 0;
    real u1 = (kk1 == 0) ? 1.0 / $sqrt(2.0) : 1.0, u2 = (kk2 == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    for (int n1 = 0; n1 < N; n1++)
      for (int n2 = 0; n2 < N; n2++)
        s += blk[n1*N+n2] * $cos((2*n1+1)*kk1*PI/(2.0*N)) * $cos((2*n2+1)*kk2*PI/(2.0*N));
    return 2.0 / N * u1 * u2 * s;
  endfunction

  function automatic coef_set_t coefs(int kk1, int kk2);
    coef_set_t c;
    real wp = (kk1 + kk2) / 2.0, wm = (kk1 - kk2) / 2.0, th = PI / N;
    real u1 = (kk1 == 0) ? 1.0 / $sqrt(2.0) : 1.0, u2 = (kk2 == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    c.alpha = coef_t'(round_fx($cos((wp - 1.0) * th), COEF_F));
    c.gamma = coef_t'(round_fx($cos(wp * th), COEF_F));
    c.beta  = coef_t'(round_fx($cos((wm - 1.0) * th), COEF_F));
    c.delta = coef_t'(round_fx($cos(wm * th), COEF_F));
    c.zeta  = coef_t'(round_fx(2.0 * $cos(th), COEF_F));
    c.eps   = coef_t'(round_fx(-u1 * u2 / N, COEF_W - 1 + KW));
    return c;
  endfunction

  // Tolerance: 2 LSB plus the effect of the 12-bit coefficients, which grows
  // with the magnitude of the block (1 LSB per 2^14 of sum |x|).
  real tol = 2.0;

  // expected results, in order, with the cycle each must appear on
  real exp_x [$];
  int  exp_cycle [$];
  int  exp_k [$];

  always @(posedge clk) if (rst_n && out_valid) begin
    real e, c;
    int  ec, ek;
    checks++;
    if (exp_x.size() == 0) begin
      failures++;
      $display("FAIL unexpected output %0d", out_x);
    end else begin
      e = exp_x.pop_front(); ec = exp_cycle.pop_front(); ek = exp_k.pop_front();
      c = e;
      if (c > 2047.0) c = 2047.0;
      if (c < -2048.0) c = -2048.0;
      if (real'(out_x) - c > tol || c - real'(out_x) > tol) begin
        failures++;
        $display("FAIL k=(%0d,%0d): got %0d want %f", ek / N, ek % N, out_x, e);
      end
      checks++;
      if (cycle != ec) begin
        failures++;
        $display("FAIL k=(%0d,%0d): at cycle %0d, expected %0d", ek / N, ek % N, cycle, ec);
      end
      checks++;
      if (out_sat != (e > 2047.5 || e < -2048.5)) begin
        failures++;
        $display("FAIL k=(%0d,%0d): out_sat=%0d for %f", ek / N, ek % N, out_sat, e);
      end
      if (out_sat) n_sat++;
    end
  end

  task automatic run_block(int range);
    int first_take = -1, last_take = 0;
    for (int i = 0; i < N * N; i++)
      blk[i] = (range == 0) ? 2047 : int'($urandom % (2 * range + 1)) - range;
    tol = 2.0;
    foreach (blk[i]) tol += ((blk[i] < 0) ? -blk[i] : blk[i]) / 16384.0;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++)
        for (int c = 0; c < N; c++) begin
          automatic bit taken = 0;
          automatic int tc;
          in_valid = 1; in_first = (c == 0); in_last = (c == N - 1);
          xa = XW'(fold(a, b, c, 0)); xs = XW'(fold(a, b, c, 1));
          coef = coefs(a, b);
          // inputs change on the falling edge; a pair is taken on the rising
          // edge when in_ready was high before it
          while (!taken) begin
            taken = in_ready;
            tc = cycle;
            @(posedge clk);
            @(negedge clk);
          end
          if (first_take < 0) first_take = tc;
          last_take = tc;
          if (c == N - 1) begin
            exp_x.push_back(dct_ref(a, b));
            exp_cycle.push_back(tc + LATENCY);
            exp_k.push_back(a * N + b);
          end
        end
    in_valid = 0;
    checks++;
    if (last_take - first_take != STEP * (N * N * N - 1)) begin
      failures++;
      $display("FAIL throughput: %0d cycles for %0d sample pairs", last_take - first_take + 1, N * N * N);
    end
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; xa = 0; xs = 0; coef = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    run_block(255);
    run_block(255);
    run_block(0);          // full scale: X(0,0) is clamped
    run_block(64);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_x.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_x.size());
    end
    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("FAIL no clamped result seen");
    end
    $display("clamped results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
