// idst1d: N-point 1-D inverse DST processor
//     x(k) = sum_{i=1..N} Y(i) * sin((2k+1) * i * pi / (2N)),   k = 0..N-1,
// built as pre-processing -> linear systolic array of (N-1)/2 PEs -> post-processing.
//
// The pre-processing stage forms Yc(i) = Y(i)cos(i*alpha) and x(0), permutes the Yc into pairs
// ordered by powers of the primitive root G and feeds them, with one tag and the coefficient
// stream, into the right-hand end of the array. The array evaluates T'(<G^k>) as a circular
// correlation with one multiplier per PE; the post-processing stage undoes the permutation and
// recovers x(k) = 2T'(k) - x(k-1).
//
// Timing (phase, en and the PE sign codes come from idst_ctrl): a block Y(1..N) enters in one
// frame of N cycles, Y(phase+1) per cycle, and x(0..N-1) leaves exactly three frames later,
// x(phase) per cycle, flagged by out_valid. Blocks may follow each other in every frame.
// Inputs are IN_W-bit integers, outputs OUT_W-bit integers (rounded); inside, data carry FB
// fractional bits and coefficients CF fractional bits (idst_pkg).
module idst1d
  import idst_pkg::*;
#(
  parameter int N    = N_DEF,
  parameter int G    = G_DEF,
  parameter int IN_W = IN_DEF,
  localparam int PW    = $clog2(N),
  localparam int M     = (N - 1) / 2,
  localparam int XW    = IN_W + FB + 2,
  localparam int YW    = IN_W + FB + $clog2(N) + 1,
  localparam int SW    = IN_W + FB + $clog2(N) + 1,
  localparam int OUT_W = IN_W + $clog2(N) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [PW-1:0]           phase,
  input  logic                    en,
  input  sign_t                   sign [M],
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  logic signed [XW-1:0] xe1, xe2;
  logic signed [CW-1:0] c;
  logic                 tc, tc_out, x0_valid;
  logic signed [SW-1:0] x0;
  logic signed [YW-1:0] y_out;

  idst_pre #(.N(N), .G(G), .IN_W(IN_W)) u_pre (
    .clk     (clk),
    .rst_n   (rst_n),
    .phase   (phase),
    .in_valid(in_valid),
    .in_data (in_data),
    .xe1     (xe1),
    .xe2     (xe2),
    .c       (c),
    .tc      (tc),
    .x0      (x0),
    .x0_valid(x0_valid)
  );

  idst_array #(.N(N), .XW(XW), .YW(YW)) u_array (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .sign (sign),
    .xe1_i(xe1),
    .xe2_i(xe2),
    .c_i  (c),
    .tc_i (tc),
    .y_o  (y_out),
    .tc_o (tc_out)
  );

  idst_post #(.N(N), .G(G), .IN_W(IN_W)) u_post (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .phase    (phase),
    .y_i      (y_out),
    .tc_i     (tc_out),
    .x0       (x0),
    .x0_valid (x0_valid),
    .out_valid(out_valid),
    .out_data (out_data)
  );

endmodule
