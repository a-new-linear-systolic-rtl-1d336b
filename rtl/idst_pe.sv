// idst_pe: processing element of the linear systolic IDST array.
//
// Every enabled cycle the PE forwards its right-hand inputs x_e1, x_e2, c and the tag t_c to
// its left neighbour through one register each, and updates the partial sum
//     y' = y +/- x * c
// where x is one of two operands chosen by the 2-bit sign code {minus, diff} supplied from
// above: diff = 0 picks the sum operand, diff = 1 the difference operand, minus = 1 subtracts.
// When t_c = 1 the operands are taken straight from x_e1/x_e2 and also loaded into the PE's
// internal registers x_i1/x_i2; when t_c = 0 the stored x_i1/x_i2 are used. This is the
// tag-controlled loading and the operation table of the PE as published.
//
// The product is rounded to the data path's scale (CF fractional coefficient bits dropped,
// round half up); that rounding, the widths, the clock enable and the reset are this design's
// own. Timing: all outputs are registered, one cycle per enabled clock; en = 0 freezes the PE.
module idst_pe #(
  parameter int XW = 22,  // operand width
  parameter int YW = 26,  // partial-sum width
  parameter int CW = 20,  // coefficient width
  parameter int CF = 18   // coefficient fractional bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [1:0]           sign,    // {minus, diff}
  input  logic signed [XW-1:0] xe1_i,   // Yc(a) + Yc(b)
  input  logic signed [XW-1:0] xe2_i,   // Yc(a) - Yc(b)
  input  logic signed [CW-1:0] c_i,
  input  logic signed [YW-1:0] y_i,
  input  logic                 tc_i,
  output logic signed [XW-1:0] xe1_o,
  output logic signed [XW-1:0] xe2_o,
  output logic signed [CW-1:0] c_o,
  output logic signed [YW-1:0] y_o,
  output logic                 tc_o
);

  logic signed [XW-1:0]    xi1, xi2;
  logic signed [XW-1:0]    x_sel;
  logic signed [XW+CW-1:0] prod;
  logic signed [YW-1:0]    term;

  always_comb begin
    if (tc_i) x_sel = sign[0] ? xe2_i : xe1_i;
    else      x_sel = sign[0] ? xi2   : xi1;
    prod = x_sel * c_i;
    term = YW'((prod + (XW+CW)'(1 <<< (CF - 1))) >>> CF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xe1_o <= '0;
      xe2_o <= '0;
      c_o   <= '0;
      y_o   <= '0;
      tc_o  <= 1'b0;
      xi1   <= '0;
      xi2   <= '0;
    end else if (en) begin
      xe1_o <= xe1_i;
      xe2_o <= xe2_i;
      c_o   <= c_i;
      tc_o  <= tc_i;
      y_o   <= sign[1] ? (y_i - term) : (y_i + term);
      if (tc_i) begin
        xi1 <= xe1_i;
        xi2 <= xe2_i;
      end
    end
  end

endmodule
