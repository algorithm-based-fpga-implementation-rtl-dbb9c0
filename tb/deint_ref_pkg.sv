// deint_ref_pkg: reference model for the deinterleaver testbenches.
//
// Independent of the RTL's counter and case structure, it computes
//  - the interleaver depth Ncbps of each (modulation, rate, size row) entry,
//    listed explicitly per column of the standard's depth table;
//  - the interleaver permutation k -> j of IEEE 802.16e (two steps:
//      m = (Ncbps/d)*(k mod d) + floor(k/d),
//      j = s*floor(m/s) + (m + Ncbps - floor(d*m/Ncbps)) mod s);
//  - the deinterleaver permutation j -> k (two steps:
//      m = s*floor(j/s) + (j + floor(d*j/Ncbps)) mod s,
//      k = d*m - (Ncbps-1)*floor(d*m/Ncbps)),
// with d = 16 and s = 1, 2, 3 for QPSK, 16-QAM and 64-QAM.
package deint_ref_pkg;

  localparam int REF_D = 16;

  function automatic int ref_s(input int mod_code);
    return mod_code + 1;
  endfunction

  // Depth table: 0 for combinations that do not exist.
  function automatic int ref_ncbps(input int mod_code, input int rate_code, input int size_row);
    int col[$];
    case ({mod_code[1:0], rate_code[1:0]})
      4'b00_00: col = '{96, 192, 288, 384, 480, 576};   // QPSK 1/2
      4'b00_10: col = '{144, 288, 432, 576};            // QPSK 3/4
      4'b01_00: col = '{192, 384, 576};                 // 16-QAM 1/2
      4'b01_10: col = '{288, 576};                      // 16-QAM 3/4
      4'b10_00: col = '{288, 576};                      // 64-QAM 1/2
      4'b10_01: col = '{384};                           // 64-QAM 2/3
      4'b10_10: col = '{432};                           // 64-QAM 3/4
      default:  col = {};
    endcase
    if (size_row < col.size()) return col[size_row];
    return 0;
  endfunction

  function automatic int ref_interleave(input int ncbps, input int s, input int k);
    int m;
    m = (ncbps / REF_D) * (k % REF_D) + k / REF_D;
    return s * (m / s) + (m + ncbps - (REF_D * m) / ncbps) % s;
  endfunction

  function automatic int ref_deinterleave(input int ncbps, input int s, input int j);
    int m;
    m = s * (j / s) + (j + (REF_D * j) / ncbps) % s;
    return REF_D * m - (ncbps - 1) * ((REF_D * m) / ncbps);
  endfunction

endpackage
