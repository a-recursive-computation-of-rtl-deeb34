// tb_dct_preadd: self-checking test of the pre-addition unit.
//
// For random 8x8 blocks (and a few extreme ones) and every (k1,k2,m) it checks
// x_a(m) and x_s(m) against a brute-force evaluation of their definition
// (pixels with q mod N = m*g, sign (-1)^floor(q/N), q = n1k1 +- n2k2). Each
// (k1,k2) is run with g = 1 and with g = the common factor of k1, k2 and N,
// where only m < N/g may be non-zero. For every (k1,k2,g) it also checks the
// identity the whole design rests on:
//   sum_m x_a(m) cos((mg + (k1+k2)/2) pi/N) + sum_m x_s(m) cos((mg + (k1-k2)/2) pi/N)
//     = 2 sum_{n1,n2} x(n1,n2) cos((2n1+1)k1 pi/2N) cos((2n2+1)k2 pi/2N)
`timescale 1ns/1ps
module tb_dct_preadd;
  import dct_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned IN_W = 12;
  localparam int unsigned KW   = 3;
  localparam int unsigned XW   = IN_W + 2 * KW;

  logic signed [IN_W-1:0] blk [N*N];
  logic [KW-1:0]          k1, k2, m;
  logic [KW:0]            g;
  logic signed [XW-1:0]   xa, xs;

  dct_preadd #(.N(N), .IN_W(IN_W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_x(int kk1, int kk2, int mm, int gg, bit diff);
    int s = 0;
    for (int n1 = 0; n1 < N; n1++)
      for (int n2 = 0; n2 < N; n2++) begin
        automatic int qq = diff ? n1 * kk1 - n2 * kk2 : n1 * kk1 + n2 * kk2;
        automatic int fl = (qq >= 0) ? qq / N : -((-qq + N - 1) / N);   // floor(qq/N)
        if (qq - fl * N == mm * gg) s += (fl % 2 == 0) ? int'(blk[n1*N+n2]) : -int'(blk[n1*N+n2]);
      end
    return s;
  endfunction

  initial begin
    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < N * N; i++)
        blk[i] = (t == 0) ? 12'sd2047 : (t == 1) ? -12'sd2048 : IN_W'($urandom);
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++)
        for (int gsel = 0; gsel < 2; gsel++) begin
          automatic real lhs = 0, rhs = 0;
          automatic int  gf = 1;
          if (gsel == 1)
            for (int d = 2; d <= N; d++)
              if (N % d == 0 && a % d == 0 && b % d == 0) gf = d;
          for (int c = 0; c < N; c++) begin
            k1 = KW'(a); k2 = KW'(b); m = KW'(c); g = (KW+1)'(gf);
            #1;
            checks++;
            if (int'(xa) != ref_x(a, b, c, gf, 0) || int'(xs) != ref_x(a, b, c, gf, 1)) begin
              failures++;
              $display("FAIL t=%0d k=(%0d,%0d) g=%0d m=%0d xa=%0d/%0d xs=%0d/%0d", t, a, b, gf, c,
                       xa, ref_x(a, b, c, gf, 0), xs, ref_x(a, b, c, gf, 1));
            end
            if (c >= N / gf) begin
              checks++;
              if (xa != 0 || xs != 0) begin
                failures++;
                $display("FAIL t=%0d k=(%0d,%0d) g=%0d: m=%0d beyond N/g not empty", t, a, b, gf, c);
              end
            end else begin
              lhs += xa * $cos((c * gf + (a + b) / 2.0) * PI / N)
                   + xs * $cos((c * gf + (a - b) / 2.0) * PI / N);
            end
          end
          for (int n1 = 0; n1 < N; n1++)
            for (int n2 = 0; n2 < N; n2++)
              rhs += 2.0 * blk[n1*N+n2] * $cos((2*n1+1)*a*PI/(2.0*N)) * $cos((2*n2+1)*b*PI/(2.0*N));
          checks++;
          if (lhs - rhs > 1e-6 * 2048 * N * N || rhs - lhs > 1e-6 * 2048 * N * N) begin
            failures++;
            $display("FAIL identity t=%0d k=(%0d,%0d) g=%0d: %f vs %f", t, a, b, gf, lhs, rhs);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
