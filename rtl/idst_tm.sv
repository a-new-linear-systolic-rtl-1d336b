// idst_tm: transpose memory between the row and the column IDST processors.
//
// Two banks of N x N words. The row processor's output is written one word per cycle at
// (wr_bank, wr_row, wr_col); the column processor reads one word per cycle at
// (rd_bank, rd_row, rd_col). With rows written row by row and read column by column the block
// comes out transposed, and while one bank is read the other is filled (ping-pong), so blocks
// can follow each other without a gap. Writes are registered; the read is combinational, so a
// word is available in the cycle its address is presented. All addresses come from the control
// logic. The memory's place in the data path is the published one; its organisation (two banks,
// register array) is this design's choice.
module idst_tm #(
  parameter int N = 11,
  parameter int W = 17,
  localparam int PW = $clog2(N)
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic                wr_bank,
  input  logic [PW-1:0]       wr_row,
  input  logic [PW-1:0]       wr_col,
  input  logic signed [W-1:0] wr_data,
  input  logic                rd_bank,
  input  logic [PW-1:0]       rd_row,
  input  logic [PW-1:0]       rd_col,
  output logic signed [W-1:0] rd_data
);

  logic signed [W-1:0] mem [2][N][N];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wr_row][wr_col] <= wr_data;
  end

  assign rd_data = mem[rd_bank][rd_row][rd_col];

endmodule
