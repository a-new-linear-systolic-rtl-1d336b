// tb_idst_array: self-checking test of the linear systolic array alone (N = 11, G = 2).
//
// The testbench plays the part of the pre-processing and control stages with its own code:
// it draws random auxiliary inputs Yc(1..N-1), forms the pairs in G-power order, schedules them
// with one tag per transform, generates the period-M coefficient stream and the per-PE sign codes
// from psi(k,i) = floor(<G^k><G^i>/N), and holds the clock enable low on random cycles (the
// array must then freeze). Each output T'(<G^k>) must appear exactly M-1+k enabled cycles after
// the tag, and equal sum_i Yc(i) sin(pi <G^k> i / N) (floating point) within the rounding bound.
module tb_idst_array;
  import idst_pkg::*;

  localparam int N  = 11, G = 2, M = (N - 1) / 2;
  localparam int XW = 22, YW = 25;
  localparam int NT = 12;                 // transforms
  localparam int T0 = M - 1 + 3;          // tau0 of transform 0

  logic clk = 0, rst_n = 0, en, tc_i, tc_o;
  sign_t sign [M];
  logic signed [XW-1:0] xe1_i, xe2_i;
  logic signed [CW-1:0] c_i;
  logic signed [YW-1:0] y_o;

  idst_array #(.N(N), .XW(XW), .YW(YW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0;
  int yc [NT][1:N-1];
  int tau = 0;

  function automatic int gp(int e);
    int r = 1;
    for (int q = 0; q < e; q++) r = (r * G) % N;
    return r;
  endfunction

  function automatic logic [1:0] code(int k, int i);
    int a, b;
    a = (gp(k) * gp(i)) / N;
    b = (gp(k) * gp(i + M)) / N;
    return {1'(a % 2), 1'((a + b) % 2)};
  endfunction

  function automatic int cq(real v);
    return $rtoi($floor(v * (2.0 ** CF) + 0.5));
  endfunction

  initial begin
    en = 0; tc_i = 0; xe1_i = 0; xe2_i = 0; c_i = 0;
    foreach (sign[j]) sign[j] = '0;
    for (int t = 0; t < NT; t++)
      for (int i = 1; i < N; i++)
        yc[t][i] = (t == 0) ? ((i % 2 != 0) ? 1048575 : -1048576) : int'($urandom_range(0, 2097151)) - 1048576;
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    int t, i, k, rel;
    real ref_v, tol, d;
    en = ($urandom_range(0, 3) != 0);
    if (!en) begin
      n_stall++;
      tc_i  = 1'($urandom);
      xe1_i = XW'($urandom);
      xe2_i = XW'($urandom);
      c_i   = CW'($urandom);
    end else begin
      // pair of column i of transform t at tau = T0 + 2M t - M + i
      tc_i = 0; xe1_i = '0; xe2_i = '0;
      rel = tau - T0 + M;
      if (rel > 0) begin
        t = (rel - 1) / (2 * M);
        i = rel - t * 2 * M;
        if (t < NT && i <= M) begin
          xe1_i = XW'(yc[t][gp(i)] + yc[t][gp(i + M)]);
          xe2_i = XW'(yc[t][gp(i)] - yc[t][gp(i + M)]);
          tc_i  = (i == M);
        end
      end
      c_i = CW'(cq($sin(PI * gp(1 + (((tau - T0) % M) + M) % M) / real'(N))));
      for (int j = 1; j <= M; j++)
        sign[j-1] = code((((tau - T0 - (j - 1)) % (2 * M)) + 2 * M) % (2 * M) + 1, M + 1 - j);
      // output of row k of transform t at tau = T0 + 2M t + M - 1 + k
      rel = tau - T0 - M + 1;
      if (rel >= 1) begin
        t = (rel - 1) / (2 * M);
        k = rel - t * 2 * M;
        if (t < NT) begin
          ref_v = 0.0;
          tol   = 0.5 * M + 0.01;
          for (int q = 1; q < N; q++) begin
            ref_v += yc[t][q] * $sin(PI * real'((gp(k) * q) % N) / real'(N)) * (((gp(k) * q / N) % 2 != 0) ? -1.0 : 1.0);
            tol   += (yc[t][q] < 0 ? -yc[t][q] : yc[t][q]) * (2.0 ** -(CF + 1));
          end
          d = real'(y_o) - ref_v;
          checks++;
          if (d > tol || d < -tol) begin
            failures++;
            $display("FAIL transform %0d T'(%0d): got %0d expected %f", t, gp(k), y_o, ref_v);
          end
          checks++;
          if (tc_o !== (k == 1)) begin
            failures++;
            $display("FAIL transform %0d row %0d: tag out %0b", t, k, tc_o);
          end
        end
      end
      tau++;
      if (tau == T0 + 2 * M * NT + M + 1) begin
        if (n_stall == 0) failures++;
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (4 * (T0 + 2 * M * NT + M + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
