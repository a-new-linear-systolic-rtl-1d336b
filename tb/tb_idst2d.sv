// tb_idst2d: end-to-end test of the 2-D IDST at its default size (N = 11, 12-bit input).
//
// Random N x N blocks are sent row by row, one row per frame; most blocks follow each other
// without a gap, some have empty frames between rows or between blocks. Every output sample
// x(k,l) is compared with the double sum computed here in floating point. The tolerance is
// 1 LSB plus the row stage's 1-LSB output rounding carried through the column transform,
// 1 + sum_i |sin((2k+1) i pi/(2N))|. The first column of each block must leave 7 frames after
// the block's last row went in. Counted mechanisms (each must occur): tag loads in both arrays,
// array freeze cycles with data in flight, both transpose banks filled, a bank read that follows
// the previous one without a gap, empty frames on the input, out_first markers.
module tb_idst2d;
  import idst_pkg::*;

  localparam int N     = N_DEF;
  localparam int IN_W  = IN_DEF;
  localparam int PW    = $clog2(N);
  localparam int MW    = IN_W + $clog2(N) + 1;
  localparam int OUT_W = MW + $clog2(N) + 1;
  localparam int NB    = 7;            // blocks
  localparam int MAXF  = NB * N + 40;  // input frames available

  logic clk = 0, rst_n = 0;
  logic [PW-1:0] frame_phase;
  logic in_valid, out_valid, out_first;
  logic signed [IN_W-1:0] in_data;
  logic signed [OUT_W-1:0] out_data;

  idst2d dut (
    .clk(clk), .rst_n(rst_n), .frame_phase(frame_phase), .in_valid(in_valid),
    .in_data(in_data), .out_valid(out_valid), .out_first(out_first), .out_data(out_data));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int xin [NB][N][N];          // X(i+1, j+1)
  int row_frame [MAXF];        // -1: empty frame, else block*N + row
  int last_row_frame [NB];
  real rx [NB][N][N];          // reference x(k, l)
  int frame = -1, out_frames = 0, done_blocks = 0;
  real tolk [N];
  real d;
  int blk, col;
  int n_tag1 = 0, n_tag2 = 0, n_freeze = 0, n_bank [2] = '{0, 0}, n_chain = 0, n_gap = 0, n_first = 0;

  function automatic real sn(int a, int b);
    return $sin(real'(a) * real'(b) * PI / (2.0 * N));
  endfunction

  initial begin
    int f, r;
    real s;
    // data
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (b == 1) xin[b][i][j] = ((i + j) % 2 != 0) ? 2047 : -2048;
          else        xin[b][i][j] = $urandom_range(0, 4095) - 2048;
    // reference
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
      for (int i = 1; i <= N; i++) tolk[k] += ($sin((2 * k + 1) * i * PI / (2.0 * N)) < 0) ?
          -$sin((2 * k + 1) * i * PI / (2.0 * N)) : $sin((2 * k + 1) * i * PI / (2.0 * N));
    end
    // frame schedule: blocks 0..2 back to back, gaps inside block 3 and before block 5
    f = 0;
    for (int q = 0; q < MAXF; q++) row_frame[q] = -1;
    for (int b = 0; b < NB; b++) begin
      if (b == 5) f += 2;
      for (r = 0; r < N; r++) begin
        if (b == 3 && (r == 2 || r == 7)) f++;
        row_frame[f] = b * N + r;
        last_row_frame[b] = f;
        f++;
      end
    end
    in_valid = 0;
    in_data  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    if (frame_phase == '0) frame++;
    if (frame >= 0 && frame < MAXF && row_frame[frame] >= 0) begin
      in_valid = 1;
      in_data  = IN_W'(xin[row_frame[frame] / N][row_frame[frame] % N][int'(frame_phase)]);
    end else begin
      in_valid = 0;
      in_data  = IN_W'($urandom);
      if (frame >= 0 && frame < last_row_frame[NB-1] && frame_phase == '0) n_gap++;
    end

    if (out_valid) begin
      blk = out_frames / N;
      col = out_frames % N;
      if (blk < NB) begin
        d = real'(out_data) - rx[blk][int'(frame_phase)][col];
        checks++;
        if (d > tolk[frame_phase] || d < -tolk[frame_phase]) begin
          failures++;
          $display("FAIL block %0d x(%0d,%0d): got %0d expected %f", blk, frame_phase, col, out_data, rx[blk][frame_phase][col]);
        end
        if (col == 0 && frame_phase == '0) begin
          checks++;
          if (frame != last_row_frame[blk] + 7) begin
            failures++;
            $display("FAIL block %0d: first column in frame %0d, expected %0d", blk, frame, last_row_frame[blk] + 7);
          end
        end
        checks++;
        if (out_first !== (col == 0 && frame_phase == '0)) begin
          failures++;
          $display("FAIL out_first wrong in block %0d", blk);
        end
        if (out_first) n_first++;
      end
      if (32'(frame_phase) == N - 1) begin
        out_frames++;
        if (out_frames % N == 0) done_blocks++;
      end
    end

    if (done_blocks == NB) begin
      checks++;
      if (n_tag1 < NB * N || n_tag2 < NB * N || n_freeze == 0 || n_bank[0] == 0 || n_bank[1] == 0
          || n_chain == 0 || n_gap == 0 || n_first != NB) begin
        failures++;
        $display("FAIL a mechanism did not occur");
      end
      $display("tag loads row/col %0d/%0d, freezes %0d, bank fills %0d/%0d, chained reads %0d, empty frames %0d, blocks %0d",
               n_tag1, n_tag2, n_freeze, n_bank[0], n_bank[1], n_chain, n_gap, n_first);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.u_row.u_array.tc_i && dut.en) n_tag1++;
    if (dut.u_col.u_array.tc_i && dut.en) n_tag2++;
    if (!dut.en && (dut.s1_valid || dut.rd_valid)) n_freeze++;
    if (dut.u_ctrl.wr_done) n_bank[dut.wr_bank]++;
    if (dut.u_ctrl.done_now && dut.u_ctrl.last && (dut.u_ctrl.full[~dut.rd_bank] ||
        (dut.u_ctrl.wr_done && dut.wr_bank != dut.rd_bank))) n_chain++;
  end

  initial begin
    repeat ((MAXF + 40) * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
