// tb_dct2d_recursive: end-to-end test of the 2-D DCT, both architectures.
//
// Four copies of the design run side by side: Architecture-1 (ARCH = 1) and
// Architecture-2 (ARCH = 2), each with full-length sequences (CASE2 = 0) and
// with sequences shortened by common factors (CASE2 = 1). Each gets its own stream
// of 8x8 pixel blocks with random gaps in in_valid. Every output X(k1,k2) is
// compared with the 2-D DCT worked out here from its definition, rounded and
// clamped to 12 bits. The tolerance is 2 LSB plus a share for the 12-bit
// coefficients that grows with the block's magnitude. The test also checks
// the (k1,k2) tags, out_sat, and the number of clocks from the last pixel of
// a block to its last result: 1 + STEP*(T - 1) + LATENCY, with STEP = 1 or 2
// clocks per recursion step, LATENCY = 3 or 4, and T the recursion steps per
// block: N^3 = 512, or the sum of N/gcd(k1,k2,N) over all (k1,k2) = 439.
// It counts, and requires to happen at least once per architecture:
//   - back-pressure: a pixel offered while the design is computing,
//   - overlap: the next block loading while results of the previous one drain,
//   - gaps: cycles without a pixel while loading,
//   - clamping: a result outside 12 bits marked by out_sat,
//   - shortening (CASE2 = 1 copies only): results computed from M < N samples.
`timescale 1ns/1ps
module tb_dct2d_recursive;
  import dct_pkg::*;

  localparam int unsigned N      = 8;
  localparam int unsigned IN_W   = 12;
  localparam int unsigned OUT_W  = 12;
  localparam int unsigned KW     = 3;
  localparam int unsigned BLOCKS = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks [5];
  int failures [5];
  bit done [5];

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum() + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // number of (k1,k2) sharing the factor g with N, and the steps of a block
  function automatic int common(int kk1, int kk2);
    int gg = N;
    while (N % gg != 0 || kk1 % gg != 0 || kk2 % gg != 0) gg--;
    return gg;
  endfunction

  function automatic int block_steps(bit c2);
    int t = 0;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) t += c2 ? N / common(a, b) : N;
    return t;
  endfunction

  // copy g: ARCH = 1 + (g-1) % 2, CASE2 = (g > 2)
  for (genvar g = 1; g <= 4; g++) begin : g_arch
    localparam int ARCH    = 1 + (g - 1) % 2;
    localparam bit C2      = (g > 2);
    localparam int STEP    = ARCH;
    localparam int LATENCY = (ARCH == 1) ? 3 : 4;
    localparam string NAME = C2 ? ((ARCH == 1) ? "ARCH=1 CASE2" : "ARCH=2 CASE2")
                                : ((ARCH == 1) ? "ARCH=1" : "ARCH=2");

    logic                    in_valid, in_ready, out_valid, out_sat;
    logic signed [IN_W-1:0]  in_pixel;
    logic [KW-1:0]           out_k1, out_k2;
    logic signed [OUT_W-1:0] out_x;

    dct2d_recursive #(.ARCH(ARCH), .CASE2(C2)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_pixel,
      .out_valid, .out_k1, .out_k2, .out_x, .out_sat
    );

    real exp_x [$];
    real exp_tol [$];
    int  exp_k [$];
    int  exp_last_cycle [$];
    int  n_bp = 0, n_overlap = 0, n_gap = 0, n_sat = 0, n_out = 0, n_short = 0;

    function automatic real dct_ref(int blk [N*N], int kk1, int kk2);
      real s = 0;
      real u1 = (kk1 == 0) ? 1.0 / $sqrt(2.0) : 1.0, u2 = (kk2 == 0) ? 1.0 / $sqrt(2.0) : 1.0;
      for (int n1 = 0; n1 < N; n1++)
        for (int n2 = 0; n2 < N; n2++)
          s += blk[n1*N+n2] * $cos((2*n1+1)*kk1*PI/(2.0*N)) * $cos((2*n2+1)*kk2*PI/(2.0*N));
      return 2.0 / N * u1 * u2 * s;
    endfunction

    // driver: inputs change on the falling edge
    initial begin
      int blk [N*N];
      in_valid = 0; in_pixel = 0;
      wait (rst_n);
      @(negedge clk);
      for (int b = 0; b < BLOCKS; b++) begin
        automatic real tol = 2.0;
        automatic int  tlast = 0;
        for (int i = 0; i < N * N; i++) begin
          case (b)
            2:       blk[i] = 2047;                                   // full scale
            3:       blk[i] = int'($urandom % 4096) - 2048;           // 12-bit random
            default: blk[i] = int'($urandom % 511) - 255;
          endcase
          tol += ((blk[i] < 0) ? -blk[i] : blk[i]) / 16384.0;
        end
        for (int i = 0; i < N * N; i++) begin
          automatic bit taken = 0;
          // a random gap before some pixels
          while ($urandom % 5 == 0) begin
            in_valid = 0;
            if (i > 0) n_gap++;
            @(negedge clk);
          end
          in_valid = 1;
          in_pixel = IN_W'(blk[i]);
          while (!taken) begin
            taken = in_ready;
            if (!taken) n_bp++;
            if (taken && i == 0 && exp_x.size() > 0) n_overlap++;
            tlast = cycle;
            @(negedge clk);
          end
        end
        in_valid = 0;
        for (int a = 0; a < N; a++)
          for (int c = 0; c < N; c++) begin
            exp_x.push_back(dct_ref(blk, a, c));
            exp_tol.push_back(tol);
            exp_k.push_back(a * N + c);
            exp_last_cycle.push_back((a == N - 1 && c == N - 1)
                                     ? tlast + 1 + STEP * (block_steps(C2) - 1) + LATENCY : -1);
          end
      end
      wait (exp_x.size() == 0);
      repeat (10) @(posedge clk);
      // every mechanism must have happened
      checks[g] += 5;
      if (n_bp == 0)      begin failures[g]++; $display("FAIL %s: no back-pressure", NAME); end
      if (n_overlap == 0) begin failures[g]++; $display("FAIL %s: no overlap", NAME); end
      if (n_gap == 0)     begin failures[g]++; $display("FAIL %s: no input gap", NAME); end
      if (n_sat == 0)     begin failures[g]++; $display("FAIL %s: no clamped result", NAME); end
      if (C2 != (n_short > 0)) begin
        failures[g]++; $display("FAIL %s: %0d shortened results", NAME, n_short);
      end
      checks[g]++;
      if (n_out != BLOCKS * N * N) begin
        failures[g]++; $display("FAIL %s: %0d results", NAME, n_out);
      end
      $display("%s: results %0d, back-pressure %0d, overlap %0d, gaps %0d, clamped %0d, shortened %0d",
               NAME, n_out, n_bp, n_overlap, n_gap, n_sat, n_short);
      done[g] = 1;
    end

    // monitor
    always @(posedge clk) if (rst_n && out_valid) begin
      real e, c, t;
      int  k, lc;
      n_out++;
      if (C2 && common(int'(out_k1), int'(out_k2)) > 1) n_short++;
      checks[g]++;
      if (exp_x.size() == 0) begin
        failures[g]++;
        $display("FAIL %s: unexpected output", NAME);
      end else begin
        e = exp_x.pop_front(); t = exp_tol.pop_front();
        k = exp_k.pop_front(); lc = exp_last_cycle.pop_front();
        c = (e > 2047.0) ? 2047.0 : (e < -2048.0) ? -2048.0 : e;
        if (real'(out_x) - c > t || c - real'(out_x) > t) begin
          failures[g]++;
          $display("FAIL %s k=(%0d,%0d): got %0d want %f", NAME, k / N, k % N, out_x, e);
        end
        checks[g]++;
        if (int'(out_k1) != k / N || int'(out_k2) != k % N) begin
          failures[g]++;
          $display("FAIL %s: tag (%0d,%0d), expected (%0d,%0d)", NAME, out_k1, out_k2, k / N, k % N);
        end
        checks[g]++;
        if (out_sat != (e > 2047.5 || e < -2048.5)) begin
          failures[g]++;
          $display("FAIL %s k=(%0d,%0d): out_sat=%0d for %f", NAME, k / N, k % N, out_sat, e);
        end
        if (out_sat) n_sat++;
        if (lc >= 0) begin
          checks[g]++;
          if (cycle != lc) begin
            failures[g]++;
            $display("FAIL %s: block finished at cycle %0d, expected %0d", NAME, cycle, lc);
          end
        end
      end
    end
  end

  initial begin
    wait (done[1] && done[2] && done[3] && done[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks.sum(), failures.sum());
    $finish;
  end
endmodule
