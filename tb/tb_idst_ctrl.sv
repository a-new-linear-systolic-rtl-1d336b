// tb_idst_ctrl: self-checking test of the control logic (N = 11, G = 2).
//
// Frame timing: phase counts 0..N-1, en is low only in phase N-1.
// Sign codes: PE j in phase p must carry entry (k, M+1-j), k = ((p - M - j + 2) mod 2M) + 1, of
// the 10 x 5 sign matrix of the N = 11, G = 2 transform, which is typed in here as a table.
// Transpose-memory addressing: with random valid/empty stage-1 frames the testbench keeps its
// own model of the two banks (rows written, column being read) and checks every write and read
// address, that each full bank is read column 0..N-1 starting in the next frame, and that both
// banks are used.
module tb_idst_ctrl;
  import idst_pkg::*;

  localparam int N = 11, G = 2, M = 5, PW = $clog2(N);

  // rows k = 1..10 (T'(2), T'(4), ...), columns i = 1..5; {minus, diff}
  localparam logic [1:0] SIGN [10][5] = '{
    '{2'b01, 2'b01, 2'b11, 2'b01, 2'b11},
    '{2'b01, 2'b11, 2'b01, 2'b11, 2'b11},
    '{2'b11, 2'b01, 2'b11, 2'b11, 2'b11},
    '{2'b00, 2'b10, 2'b10, 2'b00, 2'b00},
    '{2'b11, 2'b11, 2'b11, 2'b01, 2'b11},
    '{2'b10, 2'b10, 2'b00, 2'b00, 2'b00},
    '{2'b10, 2'b00, 2'b10, 2'b10, 2'b00},
    '{2'b00, 2'b10, 2'b00, 2'b10, 2'b00},
    '{2'b11, 2'b01, 2'b01, 2'b01, 2'b11},
    '{2'b00, 2'b00, 2'b00, 2'b00, 2'b00}};

  logic clk = 0, rst_n = 0;
  logic [PW-1:0] phase, wr_row, wr_col, rd_row, rd_col;
  logic en, s1_valid, wr_en, wr_bank, rd_bank, rd_valid;
  sign_t sign [M];

  idst_ctrl #(.N(N), .G(G)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, frame = -1, cyc = 0;
  int m_row = 0, m_wbank = 0, m_rbank = 0, m_col = 0;
  bit m_reading = 0;
  bit m_full [2] = '{0, 0};
  int n_reads [2] = '{0, 0};
  int exp_phase = 0;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp);
    end
  endtask

  initial begin
    s1_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    int k, comp, nb;
    cyc++;
    chk("phase", int'(phase), exp_phase);
    chk("en", int'(en), int'(exp_phase != N - 1));
    if (exp_phase == 0) begin
      frame++;
      s1_valid = (frame < 120) && ($urandom_range(0, 5) != 0);
    end
    if (exp_phase != N - 1)
      for (int j = 1; j <= M; j++) begin
        k = ((exp_phase - M - j + 2 + 4 * M) % (2 * M)) + 1;
        chk("sign", int'(sign[j-1]), int'(SIGN[k-1][M+1-j-1]));
      end
    // memory addressing
    chk("wr_en", int'(wr_en), int'(s1_valid));
    if (s1_valid) begin
      chk("wr_bank", int'(wr_bank), m_wbank);
      chk("wr_row", int'(wr_row), m_row);
      chk("wr_col", int'(wr_col), exp_phase);
    end
    chk("rd_valid", int'(rd_valid), int'(m_reading));
    if (m_reading) begin
      chk("rd_bank", int'(rd_bank), m_rbank);
      chk("rd_col", int'(rd_col), m_col);
      chk("rd_row", int'(rd_row), exp_phase);
    end
    // model update at the end of the frame
    if (exp_phase == N - 1) begin
      comp = 0;
      if (s1_valid) begin
        if (m_row == N - 1) begin
          m_row = 0; m_full[m_wbank] = 1; comp = 1; m_wbank = 1 - m_wbank;
        end else m_row++;
      end
      if (m_reading && m_col == N - 1) begin
        m_full[m_rbank] = 0; n_reads[m_rbank]++; m_rbank = 1 - m_rbank; m_reading = 0;
      end else if (m_reading) m_col++;
      if (!m_reading && m_full[m_rbank]) begin
        m_reading = 1; m_col = 0;
      end
    end
    exp_phase = (exp_phase == N - 1) ? 0 : exp_phase + 1;
    if (frame == 130) begin
      if (n_reads[0] == 0 || n_reads[1] == 0) failures++;
      $display("banks read: %0d/%0d", n_reads[0], n_reads[1]);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (140 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
