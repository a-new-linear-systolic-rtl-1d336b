// idst_post: post-processing stage of a 1-D IDST processor.
//
// The systolic array delivers T'(<G^k>), k = 1..N-1, in Galois-field order, one per enabled
// cycle, the first one marked by the tag tc_i. This stage writes each value into a buffer at its
// natural index <G^k>, so the order is undone by addressing alone. x(0) = sum Ys(i) arrives
// from the pre-processing stage (x0 with x0_valid) about M cycles ahead of the tag and is kept
// with the block. Once a block is complete, the next frame outputs it in natural order by the
// recursion
//     x(0) = sum Ys(i),   x(k) = T(k) - x(k-1) = 2*T'(k) - x(k-1),   k = 1..N-1,
// one sample per cycle, x(phase) in each phase of the frame, rounded to an integer.
//
// Two T' buffers alternate between blocks. With the fixed schedule of this design the oldest
// block is read out entirely before the block two later overwrites its buffer, apart from a
// single write of address <G> in the frame's phase N-2, when only address N-1 is still to be
// read; a read in the same cycle as a write sees the old value.
// The reorder and the recursion follow the published algorithm; the buffers, the frame-aligned
// output and the rounding are this design's own.
module idst_post
  import idst_pkg::*;
#(
  parameter int N    = N_DEF,
  parameter int G    = G_DEF,
  parameter int IN_W = IN_DEF,
  localparam int PW    = $clog2(N),
  localparam int YW    = IN_W + FB + $clog2(N) + 1,
  localparam int SW    = IN_W + FB + $clog2(N) + 1,
  localparam int XOW   = IN_W + FB + $clog2(N) + 2,
  localparam int OUT_W = IN_W + $clog2(N) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,        // array clock enable: a new array output
  input  logic [PW-1:0]           phase,
  input  logic signed [YW-1:0]    y_i,       // T'(<G^k>) from the array
  input  logic                    tc_i,      // marks k = 1
  input  logic signed [SW-1:0]    x0,
  input  logic                    x0_valid,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  typedef int idx_tab_t [N];

  function automatic idx_tab_t mk_gpow();
    idx_tab_t t;
    for (int e = 0; e < N; e++) t[e] = powmod(G, e, N);
    return t;
  endfunction

  localparam idx_tab_t GPOW = mk_gpow();
  localparam int       KW   = $clog2(N);

  logic signed [YW-1:0]  tbuf [2][1:N-1];
  logic signed [SW-1:0]  sbuf [2];
  logic signed [SW-1:0]  pend_s;
  logic                  wsel;        // buffer being written
  logic                  collecting;
  logic [KW-1:0]         cnt;         // next k to be written
  logic [1:0]            ready;
  logic                  active, osel;
  logic signed [XOW-1:0] xacc;
  logic signed [YW-1:0]  t_next;

  always_comb begin
    t_next = '0;
    for (int k = 1; k < N; k++)
      if (32'(phase) + 1 == k) t_next = tbuf[osel][k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++) begin
        for (int k = 1; k < N; k++) tbuf[b][k] <= '0;
        sbuf[b] <= '0;
      end
      pend_s     <= '0;
      wsel       <= 1'b0;
      collecting <= 1'b0;
      cnt        <= '0;
      ready      <= '0;
      active     <= 1'b0;
      osel       <= 1'b0;
      xacc       <= '0;
    end else begin
      if (x0_valid) pend_s <= x0;

      // output side: choose a complete block at the frame boundary, then run the recursion
      if (32'(phase) == N - 1) begin
        if (ready[0] || ready[1]) begin
          osel   <= ready[1] && !ready[0] ? 1'b1 : 1'b0;
          active <= 1'b1;
          xacc   <= XOW'(ready[1] && !ready[0] ? sbuf[1] : sbuf[0]);
          if (ready[1] && !ready[0]) ready[1] <= 1'b0;
          else                       ready[0] <= 1'b0;
        end else begin
          active <= 1'b0;
        end
      end else if (active) begin
        xacc <= (XOW'(t_next) <<< 1) - xacc;
      end

      // input side: reorder T'(<G^k>) into natural order
      if (en) begin
        if (tc_i) begin
          wsel                 <= ~wsel;
          tbuf[~wsel][GPOW[1]] <= y_i;
          sbuf[~wsel]          <= pend_s;
          cnt                  <= KW'(2);
          collecting           <= 1'b1;
        end else if (collecting) begin
          for (int k = 2; k < N; k++)
            if (32'(cnt) == k) tbuf[wsel][GPOW[k]] <= y_i;
          cnt <= cnt + 1'b1;
          if (32'(cnt) == N - 1) begin
            collecting  <= 1'b0;
            ready[wsel] <= 1'b1;
          end
        end
      end
    end
  end

  // integer output, round half up
  assign out_valid = active;
  assign out_data  = OUT_W'((xacc + XOW'(1 <<< (FB - 1))) >>> FB);

  // a new block never starts while the previous one is still being collected
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
      (en && tc_i) |-> !collecting);

endmodule
