// idst_array: linear systolic array of M = (N-1)/2 PEs that evaluates the circular correlation
//     T'(<G^k>) = sum_{i=1..M} sign-corrected pair(i) * s(<G^(i+k)>),   k = 1..N-1.
//
// All streams enter at PE1 (the right-hand end) and the results leave PE_M (the left-hand end),
// so the array has I/O only at its two ends. The partial sum y (starting at 0) and the tag t_c
// move one PE per cycle. The operand pair (x_e1, x_e2) and the coefficient c move one PE per two
// cycles: between neighbouring PEs they pass through one extra register. With these speeds the
// coefficient stream, which is the period-M sequence s(<G^1>), s(<G^2>), ..., meets row k in PE j
// exactly when that PE needs s(<G^(i+k)>), and the single tag of a transform overtakes the pairs
// so that PE j captures the pair of column i = M+1-j (PE1 holds the last column, PE_M the first).
//
// Schedule in enabled cycles, tau0 = cycle in which the tag is presented at the input:
//   pair of column i presented at tau0 - M + i (i = 1..M, the tag comes with column M);
//   row k reaches PE j at tau0 + (k-1) + (j-1); sign[j-1] must then carry the code of (k, M+1-j);
//   c presented at cycle tau must be s(<G^(1 + ((tau - tau0) mod M))>);
//   T'(<G^k>) is on y_o from cycle tau0 + M - 1 + k, and tc_o marks k = 1.
// A new transform can start every N-1 enabled cycles. en = 0 freezes the whole array.
// PE function, tag mechanism and stream directions follow the published array; the read of the
// marks on the links between PEs as the extra registers is this design's interpretation.
module idst_array
  import idst_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int XW = IN_DEF + FB + 2,
  parameter int YW = IN_DEF + FB + $clog2(N_DEF) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  sign_t                sign [(N-1)/2],  // sign[j-1] drives PE j
  input  logic signed [XW-1:0] xe1_i,
  input  logic signed [XW-1:0] xe2_i,
  input  logic signed [CW-1:0] c_i,
  input  logic                 tc_i,
  output logic signed [YW-1:0] y_o,
  output logic                 tc_o
);

  localparam int M = (N - 1) / 2;

  // inputs of PE j (index j-1) and outputs of PE j
  logic signed [XW-1:0] xe1_in [M], xe2_in [M], xe1_out [M], xe2_out [M];
  logic signed [CW-1:0] c_in [M], c_out [M];
  logic signed [YW-1:0] y_in [M], y_out [M];
  logic                 tc_in [M], tc_out [M];

  assign xe1_in[0] = xe1_i;
  assign xe2_in[0] = xe2_i;
  assign c_in[0]   = c_i;
  assign y_in[0]   = '0;
  assign tc_in[0]  = tc_i;

  for (genvar j = 0; j < M; j++) begin : g_pe
    idst_pe #(.XW(XW), .YW(YW), .CW(CW), .CF(CF)) u_pe (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .sign (sign[j]),
      .xe1_i(xe1_in[j]),
      .xe2_i(xe2_in[j]),
      .c_i  (c_in[j]),
      .y_i  (y_in[j]),
      .tc_i (tc_in[j]),
      .xe1_o(xe1_out[j]),
      .xe2_o(xe2_out[j]),
      .c_o  (c_out[j]),
      .y_o  (y_out[j]),
      .tc_o (tc_out[j])
    );

    if (j < M - 1) begin : g_link
      // second register on the slow streams
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          xe1_in[j+1] <= '0;
          xe2_in[j+1] <= '0;
          c_in[j+1]   <= '0;
        end else if (en) begin
          xe1_in[j+1] <= xe1_out[j];
          xe2_in[j+1] <= xe2_out[j];
          c_in[j+1]   <= c_out[j];
        end
      end
      assign y_in[j+1]  = y_out[j];
      assign tc_in[j+1] = tc_out[j];
    end
  end

  assign y_o  = y_out[M-1];
  assign tc_o = tc_out[M-1];

endmodule
