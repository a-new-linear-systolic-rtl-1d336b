// idst_pkg: constants and elaboration-time tables shared by the IDST blocks.
//
// The transform is the N-point inverse DST (DST-III)
//     x(k) = sum_{i=1..N} Y(i) * sin((2k+1) * i * alpha),  alpha = pi/(2N),  k = 0..N-1
// computed through the auxiliary sequence T'(k) = sum_{i=1..N-1} Yc(i) * sin(2*k*i*alpha),
// Yc(i) = Y(i) * cos(i*alpha), which for prime N and a primitive root G becomes a circular
// correlation of length (N-1)/2 once inputs and outputs are permuted by powers of G.
//
// Everything here is evaluated while the design is elaborated: fixed-point coefficient values
// (rounded sines and cosines, CF fractional bits), powers of G modulo N, and the 2-bit sign
// codes of the correlation matrix. A sign code is {minus, diff}: "minus" makes a PE subtract
// its product, "diff" makes it use the difference Yc(a)-Yc(b) instead of the sum Yc(a)+Yc(b).
// The defaults N = 11, G = 2 are the worked example of the transform; the word widths are this
// design's own choice.
package idst_pkg;

  localparam int N_DEF  = 11;  // transform length (prime)
  localparam int G_DEF  = 2;   // primitive root modulo N_DEF
  localparam int IN_DEF = 12;  // width of a 2-D input coefficient
  localparam int CW     = 20;  // coefficient word width
  localparam int CF     = 18;  // fractional bits of a coefficient
  localparam int FB     = 8;   // fractional bits carried by the internal data path

  localparam real PI = 3.14159265358979323846;

  // {minus, diff}
  typedef logic [1:0] sign_t;

  // Output width of a 1-D stage with IN_W-bit integer inputs: |x(k)| <= N * max|Y|.
  function automatic int out_width(int in_w, int n);
    return in_w + $clog2(n) + 1;
  endfunction

  // <g^e>_n
  function automatic int powmod(int g, int e, int n);
    int r;
    r = 1;
    for (int t = 0; t < e; t++) r = (r * g) % n;
    return r;
  endfunction

  function automatic logic signed [CW-1:0] quant(real v);
    return CW'($rtoi($floor(v * (2.0 ** CF) + 0.5)));
  endfunction

  // cos(i*alpha) and sin(i*alpha), alpha = pi/(2n)
  function automatic logic signed [CW-1:0] cos_q(int i, int n);
    return quant($cos(PI * i / (2.0 * n)));
  endfunction

  function automatic logic signed [CW-1:0] sin_q(int i, int n);
    return quant($sin(PI * i / (2.0 * n)));
  endfunction

  // s(<g^e>) = sin(2 * <g^e> * alpha): the coefficient stream of the systolic array
  function automatic logic signed [CW-1:0] s_q(int e, int g, int n);
    return quant($sin(PI * powmod(g, e, n) / real'(n)));
  endfunction

  // psi(k,i) = (<g^k> * <g^i> - <g^(k+i)>) / n = floor(<g^k> * <g^i> / n)
  function automatic int psi(int k, int i, int g, int n);
    return (powmod(g, k, n) * powmod(g, i, n)) / n;
  endfunction

  // Sign code of row k (1..n-1) and column i (1..(n-1)/2) of the correlation matrix
  function automatic sign_t sign_code(int k, int i, int g, int n);
    int p1, p2;
    p1 = psi(k, i, g, n);
    p2 = psi(k, i + (n - 1) / 2, g, n);
    return {1'(p1 & 1), 1'((p1 ^ p2) & 1)};
  endfunction

endpackage
