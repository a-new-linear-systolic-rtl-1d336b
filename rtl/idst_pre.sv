// idst_pre: pre-processing stage of a 1-D IDST processor.
//
// Input: one block Y(1..N) per frame of N cycles, Y(phase+1) in each cycle of the frame
// (in_valid high for the whole frame, sampled at phase 0). While a block arrives, each sample is
// multiplied by cos(i*alpha) to give the auxiliary input Yc(i), stored in a fill buffer, and by
// sin(i*alpha) to add up x(0) = sum Ys(i). At the end of the frame the fill buffer is copied to a
// hold buffer, so the next block can be collected while this one is sent to the array.
//
// Output to the systolic array, in the frame after the block: in phases 0..M-1 (M = (N-1)/2)
// the pair of column i = phase+1 in Galois-field order,
//     xe1 = Yc(<G^i>) + Yc(<G^(i+M)>),   xe2 = Yc(<G^i>) - Yc(<G^(i+M)>),
// with the tag tc raised together with column M. In every phase c carries the coefficient
// s(<G^(1 + (phase+1) mod M)>), which is the periodic coefficient stream the array expects when
// the tag is presented in phase M-1. x0 and the one-cycle x0_valid are issued with the tag.
// Outputs are combinational from the hold buffer and the phase.
//
// Computing Yc and Ys here and permuting into G-power order follows the published algorithm.
// The frame format, the two buffers and the placing of the coefficient generator in this stage
// are this design's choices. Products are rounded to FB fractional bits (round half up).
module idst_pre
  import idst_pkg::*;
#(
  parameter int N    = N_DEF,
  parameter int G    = G_DEF,
  parameter int IN_W = IN_DEF,
  localparam int PW  = $clog2(N),
  localparam int M   = (N - 1) / 2,
  localparam int YCW = IN_W + FB + 1,
  localparam int XW  = YCW + 1,
  localparam int SW  = IN_W + FB + $clog2(N) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [PW-1:0]          phase,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_data,
  output logic signed [XW-1:0]   xe1,
  output logic signed [XW-1:0]   xe2,
  output logic signed [CW-1:0]   c,
  output logic                   tc,
  output logic signed [SW-1:0]   x0,
  output logic                   x0_valid
);

  typedef logic signed [CW-1:0] coef_tab_t [N];
  typedef int                   idx_tab_t  [N];

  function automatic coef_tab_t mk_cos();
    coef_tab_t t;
    for (int p = 0; p < N; p++) t[p] = cos_q(p + 1, N);
    return t;
  endfunction

  function automatic coef_tab_t mk_sin();
    coef_tab_t t;
    for (int p = 0; p < N; p++) t[p] = sin_q(p + 1, N);
    return t;
  endfunction

  function automatic coef_tab_t mk_cstream();
    coef_tab_t t;
    for (int p = 0; p < N; p++) t[p] = s_q(1 + ((p + 1) % M), G, N);
    return t;
  endfunction

  // GPOW[e] = <G^e>, e = 0..N-1
  function automatic idx_tab_t mk_gpow();
    idx_tab_t t;
    for (int e = 0; e < N; e++) t[e] = powmod(G, e, N);
    return t;
  endfunction

  localparam coef_tab_t COS_T = mk_cos();
  localparam coef_tab_t SIN_T = mk_sin();
  localparam coef_tab_t CS_T  = mk_cstream();
  localparam idx_tab_t  GPOW  = mk_gpow();

  localparam int SH = CF - FB;

  logic signed [YCW-1:0]     fill [1:N-1];
  logic signed [YCW-1:0]     hold [1:N-1];
  logic                      fill_valid, hold_valid;
  logic signed [SW-1:0]      s_acc, s_hold;
  logic signed [IN_W+CW-1:0] pc, ps;
  logic signed [YCW-1:0]     yc_term;
  logic signed [SW-1:0]      ys_term;

  // Yc(i) and Ys(i) of the sample in this cycle
  always_comb begin
    pc      = in_data * COS_T[phase];
    ps      = in_data * SIN_T[phase];
    yc_term = YCW'((pc + (IN_W+CW)'(1 <<< (SH - 1))) >>> SH);
    ys_term = SW'((ps + (IN_W+CW)'(1 <<< (SH - 1))) >>> SH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < N; i++) begin
        fill[i] <= '0;
        hold[i] <= '0;
      end
      fill_valid <= 1'b0;
      hold_valid <= 1'b0;
      s_acc      <= '0;
      s_hold     <= '0;
    end else begin
      if (32'(phase) < N - 1) fill[32'(phase) + 1] <= yc_term;
      if (phase == '0) begin
        fill_valid <= in_valid;
        s_acc      <= ys_term;
      end else begin
        s_acc <= s_acc + ys_term;
      end
      if (32'(phase) == N - 1) begin
        hold       <= fill;
        hold_valid <= fill_valid;
        s_hold     <= s_acc + ys_term;
      end
    end
  end

  // emission of the pairs, the tag and the coefficient stream
  always_comb begin
    xe1      = '0;
    xe2      = '0;
    tc       = 1'b0;
    x0       = s_hold;
    x0_valid = 1'b0;
    c        = CS_T[phase];
    for (int p = 0; p < M; p++) begin
      if (32'(phase) == p) begin
        xe1 = XW'(hold[GPOW[p + 1]]) + XW'(hold[GPOW[p + 1 + M]]);
        xe2 = XW'(hold[GPOW[p + 1]]) - XW'(hold[GPOW[p + 1 + M]]);
        if (p == M - 1) begin
          tc       = hold_valid;
          x0_valid = hold_valid;
        end
      end
    end
  end

  // a block occupies a whole frame
  a_full_frame: assert property (@(posedge clk) disable iff (!rst_n)
      (phase != '0) |-> (in_valid == fill_valid));

endmodule
