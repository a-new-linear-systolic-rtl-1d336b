// tb_idst1d_run: one configuration (N, G) of the 1-D IDST test, instantiated by tb_idst1d.
//
// Random 12-bit blocks Y(1..N) are sent frame after frame, with some empty frames in between.
// Every output sample is compared with x(k) = sum Y(i) sin((2k+1) i pi/(2N)) computed here in
// floating point (tolerance TOL LSB), and each result must leave exactly three frames after its
// block went in. Empty frames must produce no output. When finished, done rises and checks and
// failures hold the counts.
module tb_idst1d_run #(
  parameter int  N   = 11,
  parameter int  G   = 2,
  parameter real TOL = 1.0
) (
  output bit done,
  output int checks,
  output int failures
);
  import idst_pkg::*;

  localparam int IN_W  = 12;
  localparam int M     = (N - 1) / 2;
  localparam int PW    = $clog2(N);
  localparam int OUT_W = IN_W + $clog2(N) + 1;
  localparam int NF    = 60;   // frames driven

  logic clk = 0, rst_n = 0;
  logic [PW-1:0] phase;
  logic en, in_valid;
  sign_t sign [M];
  logic signed [IN_W-1:0] in_data;
  logic out_valid;
  logic signed [OUT_W-1:0] out_data;
  logic unused_tm;
  logic [PW-1:0] u_wr_row, u_wr_col, u_rd_row, u_rd_col;
  logic u_wr_en, u_wr_bank, u_rd_bank;

  int frame = -1;
  bit vld [NF+8];
  int yv [NF+8][1:N];
  int outs = 0;
  real r, d;

  always #5 clk = ~clk;

  idst_ctrl #(.N(N), .G(G)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .phase(phase), .en(en), .sign(sign), .s1_valid(1'b0),
    .wr_en(u_wr_en), .wr_bank(u_wr_bank), .wr_row(u_wr_row), .wr_col(u_wr_col),
    .rd_bank(u_rd_bank), .rd_row(u_rd_row), .rd_col(u_rd_col), .rd_valid(unused_tm));

  idst1d #(.N(N), .G(G), .IN_W(IN_W)) dut (
    .clk(clk), .rst_n(rst_n), .phase(phase), .en(en), .sign(sign),
    .in_valid(in_valid), .in_data(in_data), .out_valid(out_valid), .out_data(out_data));

  function automatic real ref_x(int f, int k);
    real s = 0.0;
    for (int i = 1; i <= N; i++) s += yv[f][i] * $sin((2 * k + 1) * i * PI / (2.0 * N));
    return s;
  endfunction

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
    for (int f = 0; f < NF + 8; f++) begin
      vld[f] = (f < NF) && (($urandom_range(0, 4) != 0) || f < 4);
      for (int i = 1; i <= N; i++) begin
        case (f % 5)
          0:       yv[f][i] = (i % 2 != 0) ? 2047 : -2048;          // extremes
          default: yv[f][i] = $urandom_range(0, 4095) - 2048;
        endcase
      end
    end
    in_valid = 0;
    in_data  = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  // drive on the falling edge, according to the phase of the frame
  always @(negedge clk) if (rst_n && !done) begin
    if (phase == '0) frame++;
    if (frame >= 0 && frame < NF + 8 && vld[frame]) begin
      in_valid = 1;
      in_data  = IN_W'(yv[frame][int'(phase) + 1]);
    end else begin
      in_valid = 0;
      in_data  = IN_W'($urandom);
    end
    // outputs belong to the block of three frames earlier
    if (frame >= 3) begin
      if (out_valid !== vld[frame - 3]) begin
        failures++;
        $display("FAIL N=%0d frame %0d phase %0d: out_valid=%0b expected %0b", N, frame, phase, out_valid, vld[frame-3]);
      end
      checks++;
      if (vld[frame - 3] && out_valid) begin
        r = ref_x(frame - 3, int'(phase));
        d = real'(out_data) - r;
        checks++;
        outs++;
        if (d > TOL || d < -TOL) begin
          failures++;
          $display("FAIL N=%0d frame %0d k=%0d: got %0d expected %f", N, frame - 3, phase, out_data, r);
        end
      end
    end else if (frame >= 0 && out_valid) begin
      failures++;
      $display("FAIL output before any block could be ready");
    end
    if (frame == NF + 6 && 32'(phase) == N - 1 && !done) begin
      if (outs < N * 20) begin
        failures++;
        $display("FAIL N=%0d: only %0d output samples", N, outs);
      end
      $display("N=%0d G=%0d: %0d checks, %0d failures", N, G, checks, failures);
      done = 1;
    end
  end


endmodule
