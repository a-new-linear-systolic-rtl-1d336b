// tb_idst2d_run: one 2-D IDST test at a chosen size, used by tb_idst2d_sizes.
//
// Instantiates idst2d with the given N, G and input width and sends three random N x N blocks
// row by row, one row per frame: blocks 0 and 1 back to back, then two empty frames, then block
// 2 with one empty frame between two of its rows. Each output x(k,l) is compared with the
// floating-point double sum, with the tolerance 1 + sum_i |sin((2k+1) i pi/(2N))| LSB (the
// row stage's 1-LSB rounding carried through the column transform). Also checked: the first
// column of each block leaves 7 frames after the block's last row, and out_first marks x(0,0).
// done goes high after the last block; checks and failures are then final. The watchdog is
// the parent's.
module tb_idst2d_run #(
  parameter int N    = 7,
  parameter int G    = 3,
  parameter int IN_W = 12
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import idst_pkg::*;

  localparam int PW    = $clog2(N);
  localparam int MW    = IN_W + $clog2(N) + 1;
  localparam int OUT_W = MW + $clog2(N) + 1;
  localparam int NB    = 3;
  localparam int MAXF  = NB * N + 20;

  logic [PW-1:0] frame_phase;
  logic in_valid, out_valid, out_first;
  logic signed [IN_W-1:0] in_data;
  logic signed [OUT_W-1:0] out_data;

  idst2d #(.N(N), .G(G), .IN_W(IN_W)) dut (
    .clk(clk), .rst_n(rst_n), .frame_phase(frame_phase), .in_valid(in_valid),
    .in_data(in_data), .out_valid(out_valid), .out_first(out_first), .out_data(out_data));

  int xin [NB][N][N];
  int row_frame [MAXF];
  int last_row_frame [NB];
  real rx [NB][N][N];
  real tolk [N];
  int frame = -1, out_frames = 0, done_blocks = 0;
  real d;
  int blk, col;

  function automatic real sn(int a, int b);
    return $sin(real'(a) * real'(b) * PI / (2.0 * N));
  endfunction

  initial begin
    int f;
    real s;
    checks = 0;
    failures = 0;
    done = 0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          xin[b][i][j] = $urandom_range(0, (1 << IN_W) - 1) - (1 << (IN_W - 1));
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < N; k++)
        for (int l = 0; l < N; l++) begin
          s = 0.0;
          for (int i = 1; i <= N; i++)
            for (int j = 1; j <= N; j++)
              s += xin[b][i-1][j-1] * sn(2 * k + 1, i) * sn(2 * l + 1, j);
          rx[b][k][l] = s;
        end
    for (int k = 0; k < N; k++) begin
      tolk[k] = 1.0;
      for (int i = 1; i <= N; i++) begin
        s = sn(2 * k + 1, i);
        tolk[k] += (s < 0.0) ? -s : s;
      end
    end
    for (int q = 0; q < MAXF; q++) row_frame[q] = -1;
    f = 0;
    for (int b = 0; b < NB; b++) begin
      if (b == 2) f += 2;
      for (int r = 0; r < N; r++) begin
        if (b == 2 && r == 1) f++;
        row_frame[f] = b * N + r;
        last_row_frame[b] = f;
        f++;
      end
    end
    in_valid = 0;
    in_data  = '0;
  end

  always @(negedge clk) if (rst_n && !done) begin
    if (frame_phase == '0) frame++;
    if (frame >= 0 && frame < MAXF && row_frame[frame] >= 0) begin
      in_valid = 1;
      in_data  = IN_W'(xin[row_frame[frame] / N][row_frame[frame] % N][int'(frame_phase)]);
    end else begin
      in_valid = 0;
      in_data  = IN_W'($urandom);
    end

    if (out_valid) begin
      blk = out_frames / N;
      col = out_frames % N;
      if (blk < NB) begin
        d = real'(out_data) - rx[blk][int'(frame_phase)][col];
        checks++;
        if (d > tolk[frame_phase] || d < -tolk[frame_phase]) begin
          failures++;
          $display("FAIL N=%0d block %0d x(%0d,%0d): got %0d expected %f",
                   N, blk, frame_phase, col, out_data, rx[blk][frame_phase][col]);
        end
        if (col == 0 && frame_phase == '0) begin
          checks++;
          if (frame != last_row_frame[blk] + 7) begin
            failures++;
            $display("FAIL N=%0d block %0d: first column in frame %0d, expected %0d",
                     N, blk, frame, last_row_frame[blk] + 7);
          end
        end
        checks++;
        if (out_first !== (col == 0 && frame_phase == '0)) begin
          failures++;
          $display("FAIL N=%0d out_first wrong in block %0d", N, blk);
        end
      end
      if (32'(frame_phase) == N - 1) begin
        out_frames++;
        if (out_frames % N == 0) done_blocks++;
      end
    end
    if (done_blocks == NB) done = 1;
  end

endmodule
