// tb_dct_coeff_rom: self-checking test of the coefficient table.
//
// Two tables are tested: the default one (every sequence N long) and one with
// CASE2 = 1, where a (k1,k2) sharing the factor g with N uses M = N/g samples.
// For every (k1,k2) of an 8x8 transform it checks fold = g and seq_len = M
// against a gcd worked out here. It compares alpha, beta, gamma, delta and
// zeta with the cosines evaluated here, using omega = (k1 +- k2)/(2g) and
// theta = pi/M, within half an LSB of the 10 fraction bits plus rounding
// slack. It compares eps with -u(k1)u(k2)/8 in its 14-fraction-bit format.
`timescale 1ns/1ps
module tb_dct_coeff_rom;
  import dct_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned KW = 3;

  logic [KW-1:0] k1, k2;
  coef_set_t     coef [2];
  logic [KW:0]   fold [2], seq_len [2];

  dct_coeff_rom #(.N(N)) dut0 (
    .k1, .k2, .coef(coef[0]), .fold(fold[0]), .seq_len(seq_len[0])
  );
  dct_coeff_rom #(.N(N), .CASE2(1'b1)) dut1 (
    .k1, .k2, .coef(coef[1]), .fold(fold[1]), .seq_len(seq_len[1])
  );

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, int v, coef_t got, real want, int frac);
    real d = real'(got) - want * (2.0 ** frac);
    checks++;
    if (d > 0.5001 || d < -0.5001) begin
      failures++;
      $display("FAIL CASE2=%0d k=(%0d,%0d) %s: got %0d want %f", v, k1, k2, name, got,
               want * (2.0 ** frac));
    end
  endtask

  initial begin
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        automatic real ua = (a == 0) ? 1.0 / $sqrt(2.0) : 1.0, ub = (b == 0) ? 1.0 / $sqrt(2.0) : 1.0;
        automatic int  gcd = N;
        while (N % gcd != 0 || a % gcd != 0 || b % gcd != 0) gcd--;
        k1 = KW'(a); k2 = KW'(b);
        #1;
        for (int v = 0; v < 2; v++) begin
          automatic int  gg = (v == 1) ? gcd : 1;
          automatic int  mm = N / gg;
          automatic real wp = (a + b) / (2.0 * gg), wm = (a - b) / (2.0 * gg), th = PI / mm;
          checks++;
          if (int'(fold[v]) != gg || int'(seq_len[v]) != mm) begin
            failures++;
            $display("FAIL CASE2=%0d k=(%0d,%0d): fold %0d seq_len %0d, want %0d %0d",
                     v, a, b, fold[v], seq_len[v], gg, mm);
          end
          check("alpha", v, coef[v].alpha, $cos((wp - 1.0) * th), COEF_F);
          check("gamma", v, coef[v].gamma, $cos(wp * th), COEF_F);
          check("beta",  v, coef[v].beta,  $cos((wm - 1.0) * th), COEF_F);
          check("delta", v, coef[v].delta, $cos(wm * th), COEF_F);
          check("zeta",  v, coef[v].zeta,  2.0 * $cos(th), COEF_F);
          check("eps",   v, coef[v].eps,   -ua * ub / N, COEF_W - 1 + KW);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
