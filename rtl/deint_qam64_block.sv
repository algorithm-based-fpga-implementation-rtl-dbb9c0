// deint_qam64_block: column term of the deinterleaver address for 64-QAM.
//
// For 64-QAM (s = 3) the standard's second permutation rotates each group of
// three bits by the row index modulo 3. With column counter i and row counter
// j the address is kn = d*col + j with
//   j mod 3 = 0:                     col = i
//   j mod 3 = 1: i mod 3 = 2       -> col = i - 2,  otherwise col = i + 1
//   j mod 3 = 2: i mod 3 = 0       -> col = i + 2,  otherwise col = i - 1
// Ncbps/d is a multiple of 3 for every 64-QAM depth, so the result stays
// within the row. Both residues are formed combinationally from the counter
// values. Purely combinational.
//
// The case split follows the address algorithm; how the residues are formed
// is this design's choice.
module deint_qam64_block
  import deint_pkg::*;
#(
  parameter int unsigned COL_W_P = COL_W,
  parameter int unsigned ROW_W_P = ROW_W
) (
  input  logic [COL_W_P-1:0] i_i,
  input  logic [ROW_W_P-1:0] j_i,
  output logic [COL_W_P-1:0] col_o
);

  logic [1:0] i_mod3, j_mod3;

  assign i_mod3 = 2'(i_i % COL_W_P'(3));
  assign j_mod3 = 2'(j_i % ROW_W_P'(3));

  always_comb begin
    unique case (j_mod3)
      2'd1:    col_o = (i_mod3 == 2'd2) ? i_i - COL_W_P'(2) : i_i + COL_W_P'(1);
      2'd2:    col_o = (i_mod3 == 2'd0) ? i_i + COL_W_P'(2) : i_i - COL_W_P'(1);
      default: col_o = i_i;
    endcase
  end

endmodule
