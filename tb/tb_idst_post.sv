// tb_idst_post: self-checking test of the post-processing stage (N = 11, G = 2).
//
// The testbench acts as the systolic array: for each block it presents x0 with x0_valid in
// phase M-1 of a frame, then T'(<G^k>), k = 1..N-1, one per enabled cycle starting in phase
// N-2 with the tag on k = 1 (the array's timing). In the frozen phase N-1 it drives garbage,
// tags included, which the stage must ignore. Blocks come in most frames, back to back.
// Expected: in the frame two after the tag frame, x(0) = x0 and x(k) = 2T'(k) - x(k-1),
// rounded to an integer, computed here with exact integer arithmetic.
module tb_idst_post;
  import idst_pkg::*;

  localparam int N = 11, G = 2, IN_W = 12, M = (N - 1) / 2, PW = $clog2(N);
  localparam int YW = IN_W + FB + $clog2(N) + 1, SW = YW, OUT_W = IN_W + $clog2(N) + 1;
  localparam int NF = 40;

  logic clk = 0, rst_n = 0, en, tc_i, x0_valid, out_valid;
  logic [PW-1:0] phase;
  logic signed [YW-1:0] y_i;
  logic signed [SW-1:0] x0;
  logic signed [OUT_W-1:0] out_data;

  idst_post #(.N(N), .G(G), .IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, frame = -1, n_out = 0;
  bit blk [NF + 4];             // a tag is sent in this frame
  longint tp [NF + 4][1:N-1];   // T'(k), natural index
  longint sx [NF + 4];
  longint xacc;

  function automatic int gp(int e);
    int r = 1;
    for (int q = 0; q < e; q++) r = (r * G) % N;
    return r;
  endfunction

  initial begin
    for (int f = 0; f < NF + 4; f++) begin
      blk[f] = (f < NF) && ($urandom_range(0, 4) != 0);
      sx[f]  = longint'($urandom_range(0, 1 << 20)) - (1 << 19);
      for (int k = 1; k < N; k++) tp[f][k] = longint'($urandom_range(0, 1 << 19)) - (1 << 18);
    end
    phase = '0;
    en = 1; tc_i = 0; y_i = '0; x0 = '0; x0_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  always @(posedge clk) if (rst_n) phase <= (32'(phase) == N - 1) ? '0 : phase + 1'b1;

  always @(negedge clk) if (rst_n) begin
    int p, k;
    longint e;
    if (phase == '0) frame++;
    p  = int'(phase);
    en = (p != N - 1);
    // x0 in phase M-1 of the tag frame
    x0_valid = (frame < NF + 4) && blk[frame] && p == M - 1;
    x0       = x0_valid ? SW'(sx[frame]) : SW'($urandom);
    // array output: row 1 in phase N-2 of the tag frame, rows 2..N-1 in phases 0..N-3 of the next
    tc_i = 0;
    y_i  = YW'($urandom);
    if (!en) begin
      tc_i = 1'($urandom);
    end else if (p == N - 2 && frame < NF + 4 && blk[frame]) begin
      tc_i = 1;
      y_i  = YW'(tp[frame][gp(1)]);
    end else if (p <= N - 3 && frame >= 1 && blk[frame - 1]) begin
      k   = p + 2;
      y_i = YW'(tp[frame - 1][gp(k)]);
    end
    // expected output: block of two frames earlier
    if (frame >= 2 && frame < NF + 4) begin
      checks++;
      if (out_valid !== blk[frame - 2]) begin
        failures++;
        $display("FAIL frame %0d phase %0d: out_valid %0b", frame, p, out_valid);
      end
      if (blk[frame - 2]) begin
        if (p == 0) xacc = sx[frame - 2];
        else        xacc = 2 * tp[frame - 2][p] - xacc;
        e = (xacc + 128) >>> 8;
        checks++;
        n_out++;
        if (longint'(out_data) != e) begin
          failures++;
          $display("FAIL frame %0d x(%0d): got %0d expected %0d", frame - 2, p, out_data, e);
        end
      end
    end
    if (frame == NF + 4) begin
      if (n_out < N * NF / 2) failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat ((NF + 8) * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
