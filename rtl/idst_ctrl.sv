// idst_ctrl: control logic shared by the two 1-D IDST processors and the transpose memory.
//
// Frame timing: a free-running phase counter 0..N-1 defines frames of N cycles; one input block
// (a row of the 2-D block) enters per frame and one result block leaves per frame. The systolic
// arrays need only N-1 cycles per transform, so they are clock-enabled in phases 0..N-2 and
// frozen in phase N-1. Counted in enabled cycles, a transform then starts every N-1 = 2M cycles,
// which keeps the period-M coefficient stream aligned with every transform.
//
// Sign streams: PE j receives, in phase p, the code of row k = ((p - M - j + 2) mod 2M) + 1 and
// column i = M + 1 - j of the sign matrix; this is the same sign sequence for every transform and
// both arrays, so it is a function of the phase alone (a small ROM of N words of 2M bits).
//
// Transpose memory addresses: rows of the stage-1 output (s1_valid frames) are written to the
// write bank at (row counter, phase). A bank that holds N rows is read column by column, one
// column per frame, at (phase, column counter), starting in the frame right after its last row
// was written; the two banks alternate. rd_valid marks the frames in which a column is read.
// Sign ROM contents follow the published sign matrix definition; the frame scheme, the freeze
// cycle and the memory addressing are this design's own.
module idst_ctrl
  import idst_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int G = G_DEF,
  localparam int PW = $clog2(N),
  localparam int M  = (N - 1) / 2
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [PW-1:0] phase,
  output logic          en,
  output sign_t         sign [M],   // sign[j-1] for PE j of both arrays
  // transpose memory
  input  logic          s1_valid,   // stage-1 output frame is valid
  output logic          wr_en,
  output logic          wr_bank,
  output logic [PW-1:0] wr_row,
  output logic [PW-1:0] wr_col,
  output logic          rd_bank,
  output logic [PW-1:0] rd_row,
  output logic [PW-1:0] rd_col,
  output logic          rd_valid
);

  typedef logic [2*M-1:0] seqw_t;  // codes of PE M..1 in one ROM word
  typedef seqw_t seq_t [N];

  function automatic seq_t mk_seq();
    seq_t  t;
    seqw_t w;
    for (int p = 0; p < N; p++) begin
      for (int j0 = 0; j0 < M; j0++)
        w[2*j0 +: 2] = sign_code(((p - M - j0 + 1 + 4 * M) % (2 * M)) + 1, M - j0, G, N);
      t[p] = w;
    end
    return t;
  endfunction

  localparam seq_t SEQ = mk_seq();

  logic       last;
  logic [1:0] full;
  logic       reading, done_now, nb, wr_done;

  assign last = (32'(phase) == N - 1);
  assign en   = !last;

  always_comb begin
    for (int j0 = 0; j0 < M; j0++) sign[j0] = SEQ[phase][2*j0 +: 2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= last ? '0 : phase + 1'b1;
  end

  // write side
  // The write enable is the row processor's output valid, passed through unchanged so the
  // memory interface is complete in one block.
  assign wr_en   = s1_valid;
  assign wr_col  = phase;
  assign wr_done = last && s1_valid && (32'(wr_row) == N - 1);

  // read side
  assign done_now = reading && (32'(rd_col) == N - 1);
  assign nb       = done_now ? ~rd_bank : rd_bank;
  assign rd_row   = phase;
  assign rd_valid = reading;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_row  <= '0;
      wr_bank <= 1'b0;
      full    <= '0;
      reading <= 1'b0;
      rd_col  <= '0;
      rd_bank <= 1'b0;
    end else if (last) begin
      if (s1_valid) begin
        if (wr_done) begin
          wr_row        <= '0;
          wr_bank       <= ~wr_bank;
          full[wr_bank] <= 1'b1;
        end else begin
          wr_row <= wr_row + 1'b1;
        end
      end
      if (done_now) begin
        full[rd_bank] <= 1'b0;
        rd_bank       <= ~rd_bank;
      end
      if (!reading || done_now) begin
        reading <= full[nb] || (wr_done && (wr_bank == nb));
        rd_col  <= '0;
      end else begin
        rd_col <= rd_col + 1'b1;
      end
    end
  end

  // the writer never starts a bank that is still waiting to be read
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
      (s1_valid && phase == '0 && wr_row == '0) |-> !full[wr_bank]);

endmodule
