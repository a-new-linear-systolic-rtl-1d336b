// tb_idst_tm: self-checking test of the transpose memory (N = 11, 17-bit words).
//
// Blocks of random words are written row by row into alternating banks while the previously
// written bank is read column by column in the same cycles; every word read must be the one
// written at the transposed position of that bank.
module tb_idst_tm;
  localparam int N = 11, W = 17, PW = $clog2(N), NB = 6;

  logic clk = 0, wr_en, wr_bank, rd_bank;
  logic [PW-1:0] wr_row, wr_col, rd_row, rd_col;
  logic signed [W-1:0] wr_data, rd_data;

  idst_tm #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int data [NB][N][N];

  initial begin
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) data[b][r][c] = int'($urandom_range(0, (1 << W) - 1)) - (1 << (W - 1));
    wr_en = 0; wr_bank = 0; rd_bank = 0; wr_row = 0; wr_col = 0; rd_row = 0; rd_col = 0; wr_data = 0;
    // block b is written in pass b and read in pass b+1
    for (int pass = 0; pass <= NB; pass++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          @(negedge clk);
          wr_bank = 1'(pass);
          wr_row  = PW'(r);
          wr_col  = PW'(c);
          wr_data = (pass < NB) ? W'(data[pass][r][c]) : '0;
          wr_en   = (pass < NB);
          rd_bank = 1'(pass - 1);
          rd_row  = PW'(c);   // column-wise: row index runs fastest
          rd_col  = PW'(r);
          #1;
          if (pass > 0) begin
            checks++;
            if (rd_data != W'(data[pass-1][rd_row][rd_col])) begin
              failures++;
              $display("FAIL block %0d (%0d,%0d): got %0d expected %0d", pass - 1, rd_row, rd_col, rd_data, data[pass-1][rd_row][rd_col]);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NB + 3) * N * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
