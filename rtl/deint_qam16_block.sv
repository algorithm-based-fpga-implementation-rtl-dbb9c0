// deint_qam16_block: column term of the deinterleaver address for 16-QAM.
//
// For 16-QAM (s = 2) the standard's second permutation swaps neighbouring
// bits on every odd row. In terms of the column counter i and row counter j
// the address is kn = d*col + j with
//   col = i                     for even j,
//   col = i + 1                 for odd j and even i,
//   col = i - 1                 for odd j and odd i.
// Because Ncbps/d is even for every 16-QAM depth, i+1 never leaves the row.
// Adding or subtracting one according to the parity of i is the same as
// inverting bit 0 of i, so the block is a single gate on the parity of j.
// Purely combinational. Only bit 0 of j_i is used; the port carries the
// whole row index so that both modulation blocks share one interface, which
// is why a lint tool reports the upper bits as unused.
//
// The case split follows the address algorithm; computing it by flipping
// bit 0 is this design's choice.
module deint_qam16_block
  import deint_pkg::*;
#(
  parameter int unsigned COL_W_P = COL_W,
  parameter int unsigned ROW_W_P = ROW_W
) (
  input  logic [COL_W_P-1:0] i_i,
  input  logic [ROW_W_P-1:0] j_i,
  output logic [COL_W_P-1:0] col_o
);

  assign col_o = {i_i[COL_W_P-1:1], i_i[0] ^ j_i[0]};

endmodule
