// tb_dct2d_full: the 2-D DCT at its default configuration (8x8 blocks,
// 12-bit pixels and results, Architecture-1), taken through complete blocks.
//
// Three blocks are streamed in back to back: a block of 8-bit image pixels,
// level-shifted to -128 .. 127 as in image coding, which must never clamp; a
// smooth gradient; and a random 12-bit block that needs clamping. Every X(k1,k2) is compared with the
// 2-D DCT worked out here from its definition, rounded and clamped to 12 bits.
// The tolerance is 2 LSB plus a share for the 12-bit coefficients that grows
// with the block's magnitude. The tags and out_sat are checked too. Each
// block must finish 1 + (N^3 - 1) + 3 clocks after its last pixel.
`timescale 1ns/1ps
module tb_dct2d_full;
  import dct_pkg::*;

  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     in_valid, in_ready, out_valid, out_sat;
  logic signed [11:0]       in_pixel;
  logic [2:0]               out_k1, out_k2;
  logic signed [11:0]       out_x;

  dct2d_recursive dut (.*);

  int checks = 0, failures = 0, cycle = 0, n_out = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_x [$];
  real exp_tol [$];
  int  exp_last_cycle [$];

  function automatic real dct_ref(int blk [N*N], int kk1, int kk2);
    real s = 0;
    real u1 = (kk1 == 0) ? 1.0 / $sqrt(2.0) : 1.0, u2 = (kk2 == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    for (int n1 = 0; n1 < N; n1++)
      for (int n2 = 0; n2 < N; n2++)
        s += blk[n1*N+n2] * $cos((2*n1+1)*kk1*PI/(2.0*N)) * $cos((2*n2+1)*kk2*PI/(2.0*N));
    return 2.0 / N * u1 * u2 * s;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    real e, c, t;
    int  lc;
    checks++;
    if (exp_x.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e = exp_x.pop_front(); t = exp_tol.pop_front(); lc = exp_last_cycle.pop_front();
      c = (e > 2047.0) ? 2047.0 : (e < -2048.0) ? -2048.0 : e;
      if (real'(out_x) - c > t || c - real'(out_x) > t) begin
        failures++;
        $display("FAIL k=(%0d,%0d): got %0d want %f", out_k1, out_k2, out_x, e);
      end
      checks++;
      if (int'(out_k1) * N + int'(out_k2) != n_out % (N * N)) begin
        failures++;
        $display("FAIL tag (%0d,%0d) for result %0d", out_k1, out_k2, n_out);
      end
      checks++;
      if (out_sat != (e > 2047.5 || e < -2048.5)) begin
        failures++;
        $display("FAIL k=(%0d,%0d): out_sat=%0d for %f", out_k1, out_k2, out_sat, e);
      end
      if (lc >= 0) begin
        checks++;
        if (cycle != lc) begin
          failures++;
          $display("FAIL block finished at cycle %0d, expected %0d", cycle, lc);
        end
      end
    end
    n_out++;
  end

  initial begin
    int blk [N*N];
    in_valid = 0; in_pixel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int b = 0; b < 3; b++) begin
      automatic real tol = 2.0;
      automatic int  tlast = 0;
      for (int i = 0; i < N * N; i++) begin
        case (b)
          0: blk[i] = int'($urandom % 256) - 128;
          1: blk[i] = 16 * (i / N) + 8 * (i % N) - 80;
          default: blk[i] = int'($urandom % 4096) - 2048;
        endcase
        tol += ((blk[i] < 0) ? -blk[i] : blk[i]) / 16384.0;
      end
      for (int i = 0; i < N * N; i++) begin
        automatic bit taken = 0;
        in_valid = 1;
        in_pixel = 12'(blk[i]);
        while (!taken) begin
          taken = in_ready;
          tlast = cycle;
          @(negedge clk);
        end
      end
      in_valid = 0;
      for (int a = 0; a < N * N; a++) begin
        exp_x.push_back(dct_ref(blk, a / N, a % N));
        exp_tol.push_back(tol);
        exp_last_cycle.push_back((a == N * N - 1) ? tlast + 1 + (N * N * N - 1) + 3 : -1);
      end
    end
    wait (exp_x.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != 3 * N * N) begin
      failures++;
      $display("FAIL %0d results", n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
