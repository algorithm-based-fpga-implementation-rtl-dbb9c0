// deint_col_counter: column counter of the deinterleaver address generator.
//
// Holds the column index i of the address being generated and steps it
// through 0 .. cols_i-1, one step per clock with en_i high, then wraps to 0.
// wrap_o is high while i = cols_i-1; together with en_i it is the carry into
// the row counter. clr_i returns i to 0 (it wins over en_i). Reset is
// synchronous and active low. cols_i must stay constant within a block and
// be at least 1.
//
// The counter and its range follow the inner loop of the address algorithm;
// the clear input and the reset are this design's additions.
module deint_col_counter
  import deint_pkg::*;
#(
  parameter int unsigned COL_W_P = COL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en_i,
  input  logic               clr_i,
  input  logic [COL_W_P-1:0] cols_i,
  output logic [COL_W_P-1:0] i_o,
  output logic               wrap_o
);

  assign wrap_o = (i_o == cols_i - COL_W_P'(1));

  always_ff @(posedge clk) begin
    if (!rst_n || clr_i)   i_o <= '0;
    else if (en_i) begin
      if (wrap_o)          i_o <= '0;
      else                 i_o <= i_o + COL_W_P'(1);
    end
  end

endmodule
