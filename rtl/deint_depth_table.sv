// deint_depth_table: interleaver depth Ncbps for a modulation, code rate and
// block size.
//
// IEEE 802.16e interleaves one forward-error-correction block at a time. Its
// depth Ncbps depends on the modulation, the code rate and how many slots the
// block spans. The table holds the seven (modulation, rate) columns with their
// single-slot depth: QPSK 1/2 = 96, QPSK 3/4 = 144, 16-QAM 1/2 = 192,
// 16-QAM 3/4 = 288, 64-QAM 1/2 = 288, 64-QAM 2/3 = 384, 64-QAM 3/4 = 432.
// Row size_i (0..5) selects (size_i + 1) times that depth, as long as the
// result does not exceed 576 bits. Other combinations (for example a 2/3 rate
// with QPSK, or a block above 576 bits) give valid_o = 0.
//
// The depths follow the standard's table; the row encoding and the valid flag
// are this design's own. Purely combinational. cols_o = Ncbps / D is the
// modulus of the column counter, since every block has D rows.
module deint_depth_table
  import deint_pkg::*;
#(
  parameter int unsigned D = D_COLS
) (
  input  mod_t               mod_i,
  input  rate_t              rate_i,
  input  logic [2:0]         size_i,
  output logic [NCBPS_W-1:0] ncbps_o,
  output logic [COL_W-1:0]   cols_o,
  output logic               valid_o
);

  logic [NCBPS_W-1:0] base;     // depth of a one-slot block
  logic [NCBPS_W+2:0] depth;    // base * (size_i + 1), before the range check

  always_comb begin
    unique case ({mod_i, rate_i})
      {MOD_QPSK,  RATE_1_2}: base = NCBPS_W'(96);
      {MOD_QPSK,  RATE_3_4}: base = NCBPS_W'(144);
      {MOD_QAM16, RATE_1_2}: base = NCBPS_W'(192);
      {MOD_QAM16, RATE_3_4}: base = NCBPS_W'(288);
      {MOD_QAM64, RATE_1_2}: base = NCBPS_W'(288);
      {MOD_QAM64, RATE_2_3}: base = NCBPS_W'(384);
      {MOD_QAM64, RATE_3_4}: base = NCBPS_W'(432);
      default:               base = '0;
    endcase
  end

  assign depth   = (NCBPS_W+3)'(base) * (NCBPS_W+3)'({1'b0, size_i} + 4'd1);
  assign valid_o = (base != '0) && (size_i <= 3'd5) && (depth <= (NCBPS_W+3)'(NCBPS_MAX));
  assign ncbps_o = valid_o ? depth[NCBPS_W-1:0] : '0;
  assign cols_o  = COL_W'(ncbps_o / NCBPS_W'(D));

endmodule
