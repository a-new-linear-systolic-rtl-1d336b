// tb_idst1d: self-checking test of the 1-D IDST processor and the control logic that times it,
// for several transform lengths: N = 11 with G = 2 (the default), and N = 5, 7 (G = 3) and
// N = 13 (G = 2). Each configuration is run by tb_idst1d_run: random and extreme 12-bit blocks,
// back to back and with empty frames, compared with the floating-point transform and checked for
// the three-frame latency. The tolerance is 1 LSB of the integer output.
module tb_idst1d;
  int  checks = 0, failures = 0;
  bit  d [4];
  int  c [4], f [4];

  tb_idst1d_run #(.N(11), .G(2), .TOL(1.0)) u_n11 (.done(d[0]), .checks(c[0]), .failures(f[0]));
  tb_idst1d_run #(.N(5),  .G(3), .TOL(1.0)) u_n5  (.done(d[1]), .checks(c[1]), .failures(f[1]));
  tb_idst1d_run #(.N(7),  .G(3), .TOL(1.0)) u_n7  (.done(d[2]), .checks(c[2]), .failures(f[2]));
  tb_idst1d_run #(.N(13), .G(2), .TOL(1.0)) u_n13 (.done(d[3]), .checks(c[3]), .failures(f[3]));

  initial begin
    wait (d[0] && d[1] && d[2] && d[3]);
    for (int q = 0; q < 4; q++) begin
      checks   += c[q];
      failures += f[q];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: the longest configuration needs about 70 frames of 13 cycles
  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
