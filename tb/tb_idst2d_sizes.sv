// tb_idst2d_sizes: the 2-D IDST end to end at sizes other than the default.
//
// Runs tb_idst2d_run at (N, G) = (5, 3), (7, 3) and (13, 2) in parallel. Each sends three
// random blocks with back-to-back and gapped rows and checks every output sample against
// floating point, the 7-frame latency and out_first. This exercises the elaboration-time
// tables (sign codes, coefficients, G-power order) and the transpose-memory addressing at
// more than one prime. A watchdog ends the run if a size never finishes.
module tb_idst2d_sizes;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d5, d7, d13;
  int   c5, c7, c13, f5, f7, f13;

  tb_idst2d_run #(.N(5),  .G(3)) u_n5  (.clk(clk), .rst_n(rst_n), .done(d5),  .checks(c5),  .failures(f5));
  tb_idst2d_run #(.N(7),  .G(3)) u_n7  (.clk(clk), .rst_n(rst_n), .done(d7),  .checks(c7),  .failures(f7));
  tb_idst2d_run #(.N(13), .G(2)) u_n13 (.clk(clk), .rst_n(rst_n), .done(d13), .checks(c13), .failures(f13));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
  end

  initial begin
    wait (rst_n);
    wait (d5 && d7 && d13);
    @(posedge clk);
    $display("checks per size: N=5 %0d, N=7 %0d, N=13 %0d", c5, c7, c13);
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c7 + c13, f5 + f7 + f13);
    $finish;
  end

  initial begin
    repeat (100 * 13) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c7 + c13, f5 + f7 + f13 + 1);
    $finish;
  end

endmodule
