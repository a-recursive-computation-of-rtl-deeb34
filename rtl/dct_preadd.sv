// dct_preadd: pre-addition of the N x N input block for one output X(k1,k2).
//
// Writing cos(a1)cos(a2) = (cos(a1+a2) + cos(a1-a2))/2 with
// a_i = (2n_i+1)k_i pi/(2N) turns the 2-D DCT into two 1-D cosine sums over the
// index products
//     q1 = n1*k1 + n2*k2        and        q2 = n1*k1 - n2*k2 (+2N^2)
// Since cos((q + c) pi/N) = (-1)^floor(q/N) cos((q mod N + c) pi/N), every
// pixel can be folded onto m = q mod N with sign (-1)^floor(q/N):
//     x_a(m) = sum over (n1,n2) with q1 mod N = m of (-1)^floor(q1/N) x(n1,n2)
//     x_s(m) = sum over (n1,n2) with q2 mod N = m of (-1)^floor(q2/N) x(n1,n2)
// These are the sequences the kernels run on, with omega = (k1 +- k2)/2 and
// M = N.
//
// When k1, k2 and N share a factor g (input g; g = 1 otherwise), every q is a
// multiple of g and the sequences shrink to M = N/g samples:
//     x_a(m) = sum over (n1,n2) with q1 mod N = m*g of (-1)^floor(q1/N) x(n1,n2)
// (and likewise x_s), to be used with omega = (k1 +- k2)/(2g) and pi/M. The
// fold and this shortening (the source's "Case 2") are the source's. The
// closed form with g = gcd(k1,k2,N) for all (k1,k2) is this design's reading.
//
// The unit is combinational: for the (k1,k2,m) on its inputs it sums the
// selected pixels of the block with signs, a tree of adders over all N*N
// pixels. The widths grow by 2*log2(N) bits, enough for all N*N pixels to
// land on the same m (this happens for k1 = k2 = 0).
module dct_preadd #(
  parameter int unsigned N    = 8,
  parameter int unsigned IN_W = 12,
  localparam int unsigned KW  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned XW  = IN_W + 2 * KW
) (
  input  logic signed [IN_W-1:0] blk [N*N],   // blk[n1*N + n2] = x(n1,n2)
  input  logic [KW-1:0]          k1,
  input  logic [KW-1:0]          k2,
  input  logic [KW-1:0]          m,
  input  logic [KW:0]            g,       // common factor, 1 .. N
  output logic signed [XW-1:0]   xa,
  output logic signed [XW-1:0]   xs
);

  // per pixel: q1 and q2 reduced modulo 2N (q2 offset by 2N^2 to stay >= 0)
  localparam int unsigned TW = $clog2(2 * N) + 1;
  logic [TW-1:0]   t1 [N*N];
  logic [TW-1:0]   t2 [N*N];
  logic [2*KW+1:0] mg;

  for (genvar n1 = 0; n1 < N; n1++) begin : g_row
    for (genvar n2 = 0; n2 < N; n2++) begin : g_col
      assign t1[n1*N + n2] = TW'((n1 * k1 + n2 * k2) % (2 * N));
      assign t2[n1*N + n2] = TW'((n1 * k1 + 2 * N * N - n2 * k2) % (2 * N));
    end
  end

  assign mg = (2*KW+2)'(m * g);

  always_comb begin
    xa = '0;
    xs = '0;
    for (int i = 0; i < N * N; i++) begin
      if ((int'(t1[i]) % N) == int'(mg)) begin
        if (int'(t1[i]) >= N) xa = xa - XW'(blk[i]);
        else                  xa = xa + XW'(blk[i]);
      end
      if ((int'(t2[i]) % N) == int'(mg)) begin
        if (int'(t2[i]) >= N) xs = xs - XW'(blk[i]);
        else                  xs = xs + XW'(blk[i]);
      end
    end
  end

endmodule
