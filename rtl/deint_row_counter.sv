// deint_row_counter: row counter of the deinterleaver address generator.
//
// Holds the row index j and steps it through 0 .. D-1. It advances on en_i,
// which the address generator drives with the column counter's carry, so j
// moves on once per full sweep of the columns. wrap_o is high while
// j = D-1; with the column counter also at its last value this marks the last
// address of a block. clr_i returns j to 0. Reset is synchronous, active low.
//
// The range follows the outer loop of the address algorithm; the clear input
// and the reset are this design's additions.
module deint_row_counter
  import deint_pkg::*;
#(
  parameter int unsigned D       = D_COLS,
  parameter int unsigned ROW_W_P = ROW_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en_i,
  input  logic               clr_i,
  output logic [ROW_W_P-1:0] j_o,
  output logic               wrap_o
);

  assign wrap_o = (j_o == ROW_W_P'(D - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clr_i)   j_o <= '0;
    else if (en_i) begin
      if (wrap_o)          j_o <= '0;
      else                 j_o <= j_o + ROW_W_P'(1);
    end
  end

endmodule
