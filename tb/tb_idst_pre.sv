// tb_idst_pre: self-checking test of the pre-processing stage (N = 11, G = 2, 12-bit input).
//
// A free-running phase counter frames random blocks Y(1..N), with some empty frames. In the frame
// after each block the testbench checks, against floating-point values computed here:
// the pairs Yc(<G^i>) +/- Yc(<G^(i+M)>) in phases 0..M-1 (within 1 LSB of FB = 8 fractional
// bits), zero pairs elsewhere, the tag and x0_valid in phase M-1 only for blocks, x(0) = sum Ys(i),
// and in every phase the coefficient s(<G^(1 + (phase+1) mod M)>).
module tb_idst_pre;
  import idst_pkg::*;

  localparam int N = 11, G = 2, IN_W = 12, M = (N - 1) / 2, PW = $clog2(N);
  localparam int XW = IN_W + FB + 2, SW = IN_W + FB + $clog2(N) + 1;
  localparam int NF = 30;

  logic clk = 0, rst_n = 0, in_valid, tc, x0_valid;
  logic [PW-1:0] phase;
  logic signed [IN_W-1:0] in_data;
  logic signed [XW-1:0] xe1, xe2;
  logic signed [CW-1:0] c;
  logic signed [SW-1:0] x0;

  idst_pre #(.N(N), .G(G), .IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, frame = -1, n_tag = 0;
  int yv [NF][1:N];
  bit vld [NF];
  real sc = 256.0;  // 2^FB

  function automatic int gp(int e);
    int r = 1;
    for (int q = 0; q < e; q++) r = (r * G) % N;
    return r;
  endfunction

  function automatic int abs_i(int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic real ycr(int f, int i);
    return yv[f][i] * $cos(PI * i / (2.0 * N)) * sc;
  endfunction

  task automatic near(string what, real got, real exp, real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL frame %0d phase %0d %s: got %f expected %f", frame, phase, what, got, exp);
    end
  endtask

  initial begin
    for (int f = 0; f < NF; f++) begin
      vld[f] = (f < NF - 2) && ($urandom_range(0, 3) != 0 || f == 0);
      for (int i = 1; i <= N; i++) yv[f][i] = (f == 1) ? 2047 : int'($urandom_range(0, 4095)) - 2048;
    end
    phase = '0;
    in_valid = 0;
    in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  always @(posedge clk) if (rst_n) phase <= (32'(phase) == N - 1) ? '0 : phase + 1'b1;

  always @(negedge clk) if (rst_n) begin
    real s, tq;
    int p;
    if (phase == '0) frame++;
    p = int'(phase);
    in_valid = (frame < NF) && vld[frame];
    in_data  = in_valid ? IN_W'(yv[frame][p + 1]) : IN_W'($urandom);
    // coefficient stream
    near("c", real'(c), $sin(PI * gp(1 + (p + 1) % M) / real'(N)) * (2.0 ** CF), 0.5);
    if (frame >= 1 && frame <= NF) begin
      if (p < M && vld[frame - 1]) begin
        // 1 LSB of rounding plus the coefficient rounding (2^-15 of |Y|)
        tq = 1.0 + (abs_i(yv[frame - 1][gp(p + 1)]) + abs_i(yv[frame - 1][gp(p + 1 + M)])) * sc * (2.0 ** -(CF + 1));
        near("xe1", real'(xe1), ycr(frame - 1, gp(p + 1)) + ycr(frame - 1, gp(p + 1 + M)), tq);
        near("xe2", real'(xe2), ycr(frame - 1, gp(p + 1)) - ycr(frame - 1, gp(p + 1 + M)), tq);
      end
      checks++;
      if (tc !== (p == M - 1 && vld[frame - 1]) || x0_valid !== tc) begin
        failures++;
        $display("FAIL frame %0d phase %0d: tc=%0b x0_valid=%0b", frame, p, tc, x0_valid);
      end
      if (tc) begin
        n_tag++;
        s = 0.0;
        tq = N * 0.5 + 0.01;
        for (int i = 1; i <= N; i++) begin
          s  += yv[frame - 1][i] * $sin(PI * i / (2.0 * N)) * sc;
          tq += abs_i(yv[frame - 1][i]) * sc * (2.0 ** -(CF + 1));
        end
        near("x0", real'(x0), s, tq);
      end
      checks++;
      if (p >= M && (xe1 != 0 || xe2 != 0)) begin
        failures++;
        $display("FAIL frame %0d phase %0d: pair outside the emission window", frame, p);
      end
    end
    if (frame == NF) begin
      if (n_tag < NF / 2) failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat ((NF + 4) * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
