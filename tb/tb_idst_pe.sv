// tb_idst_pe: self-checking test of one processing element.
//
// Random operands, coefficients, partial sums, tags, sign codes and clock enables are applied;
// a model kept here (its own copy of the internal registers x_i1/x_i2) predicts every output:
// forwarding of x_e1, x_e2, c, t_c by one register, the tag-controlled loading, and
// y' = y +/- round(x*c / 2^18) with x chosen by the operation table of the PE.
module tb_idst_pe;
  localparam int XW = 22, YW = 25, CW = 20, CF = 18;

  logic clk = 0, rst_n = 0, en, tc_i, tc_o;
  logic [1:0] sign;
  logic signed [XW-1:0] xe1_i, xe2_i, xe1_o, xe2_o;
  logic signed [CW-1:0] c_i, c_o;
  logic signed [YW-1:0] y_i, y_o;

  idst_pe #(.XW(XW), .YW(YW), .CW(CW), .CF(CF)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint m_x1 = 0, m_x2 = 0, x, p, t, ey;
  longint e_xe1, e_xe2, e_c, e_tc, e_y;
  int n_load = 0, n_stall = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    en = 0; tc_i = 0; sign = 0; xe1_i = 0; xe2_i = 0; c_i = 0; y_i = 0;
    e_xe1 = 0; e_xe2 = 0; e_c = 0; e_tc = 0; e_y = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // outputs of the previous cycle
      check("xe1", longint'(xe1_o), e_xe1);
      check("xe2", longint'(xe2_o), e_xe2);
      check("c", longint'(c_o), e_c);
      check("tc", longint'(tc_o), e_tc);
      check("y", longint'(y_o), e_y);
      // new inputs
      en    = ($urandom_range(0, 7) != 0);
      tc_i  = ($urandom_range(0, 5) == 0);
      sign  = 2'($urandom);
      xe1_i = XW'($urandom_range(0, (1 << XW) - 1));
      xe2_i = XW'($urandom_range(0, (1 << XW) - 1));
      c_i   = (n % 10 == 0) ? CW'(1 <<< CF) : CW'($urandom);
      y_i   = YW'($urandom_range(0, (1 << (YW - 2)) - 1)) - YW'(1 << (YW - 3));
      // model
      if (tc_i) x = sign[0] ? longint'(xe2_i) : longint'(xe1_i);
      else      x = sign[0] ? m_x2 : m_x1;
      p = x * longint'(c_i);
      t = (p + (64'sd1 <<< (CF - 1))) >>> CF;
      ey = sign[1] ? longint'(y_i) - t : longint'(y_i) + t;
      if (en) begin
        e_xe1 = longint'(xe1_i); e_xe2 = longint'(xe2_i); e_c = longint'(c_i); e_tc = longint'(tc_i);
        e_y   = longint'(ey[YW-1:0]);
        e_y   = (e_y >= (1 <<< (YW - 1))) ? e_y - (1 <<< YW) : e_y;
        if (tc_i) begin
          m_x1 = longint'(xe1_i); m_x2 = longint'(xe2_i); n_load++;
        end
      end else n_stall++;
    end
    checks++;
    if (n_load == 0 || n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
