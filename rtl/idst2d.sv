// idst2d: N x N two-dimensional inverse DST
//     x(k,l) = sum_{i=1..N} sum_{j=1..N} X(i,j) sin((2k+1) i pi/(2N)) sin((2l+1) j pi/(2N))
// by row-column decomposition: a 1-D systolic IDST processor transforms the rows, a transpose
// memory turns the result around, and a second, identical processor transforms the columns.
// One control logic block drives the frame timing, the freeze cycle and the PE sign codes of
// both arrays, and the addresses of the transpose memory.
//
// Interface: one row per frame of N cycles. frame_phase tells the source where the frame is; a
// row X(r,1..N) is presented in phases 0..N-1 with in_valid high for the whole frame, rows of a
// block in order r = 1..N (frames without in_valid may come between rows). The result leaves
// column by column: frame l carries x(0..N-1, l) in phases 0..N-1 with out_valid high, and
// out_first marks x(0,0) of each block. Latency from the first input sample of a block to its
// first output sample is (N+6)*N cycles: 3 frames in the row processor, N frames to fill the
// transpose memory, 3 frames in the column processor. Throughput is one N x N block per N frames.
// Word widths: IN_W-bit input, OUT_W-bit output (the growth by about N per dimension is kept).
module idst2d
  import idst_pkg::*;
#(
  parameter int N    = N_DEF,
  parameter int G    = G_DEF,
  parameter int IN_W = IN_DEF,
  localparam int PW    = $clog2(N),
  localparam int M     = (N - 1) / 2,
  localparam int MW    = IN_W + $clog2(N) + 1,   // row-processor output / memory word
  localparam int OUT_W = MW + $clog2(N) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic [PW-1:0]           frame_phase,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic                    out_first,
  output logic signed [OUT_W-1:0] out_data
);

  logic [PW-1:0]        phase;
  logic                 en;
  sign_t                sign [M];
  logic                 s1_valid;
  logic signed [MW-1:0] s1_data, tm_rd_data;
  logic                 wr_en, wr_bank, rd_bank, rd_valid;
  logic [PW-1:0]        wr_row, wr_col, rd_row, rd_col;
  logic [PW-1:0]        out_col;

  idst_ctrl #(.N(N), .G(G)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .phase   (phase),
    .en      (en),
    .sign    (sign),
    .s1_valid(s1_valid),
    .wr_en   (wr_en),
    .wr_bank (wr_bank),
    .wr_row  (wr_row),
    .wr_col  (wr_col),
    .rd_bank (rd_bank),
    .rd_row  (rd_row),
    .rd_col  (rd_col),
    .rd_valid(rd_valid)
  );

  // row transforms
  idst1d #(.N(N), .G(G), .IN_W(IN_W)) u_row (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase    (phase),
    .en       (en),
    .sign     (sign),
    .in_valid (in_valid),
    .in_data  (in_data),
    .out_valid(s1_valid),
    .out_data (s1_data)
  );

  idst_tm #(.N(N), .W(MW)) u_tm (
    .clk    (clk),
    .wr_en  (wr_en),
    .wr_bank(wr_bank),
    .wr_row (wr_row),
    .wr_col (wr_col),
    .wr_data(s1_data),
    .rd_bank(rd_bank),
    .rd_row (rd_row),
    .rd_col (rd_col),
    .rd_data(tm_rd_data)
  );

  // column transforms
  idst1d #(.N(N), .G(G), .IN_W(MW)) u_col (
    .clk      (clk),
    .rst_n    (rst_n),
    .phase    (phase),
    .en       (en),
    .sign     (sign),
    .in_valid (rd_valid),
    .in_data  (tm_rd_data),
    .out_valid(out_valid),
    .out_data (out_data)
  );

  // column index of the output frame, for out_first
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                     out_col <= '0;
    else if (out_valid && 32'(phase) == N - 1)      out_col <= (32'(out_col) == N - 1) ? '0 : out_col + 1'b1;
  end

  assign frame_phase = phase;
  assign out_first   = out_valid && (phase == '0) && (out_col == '0);

endmodule
