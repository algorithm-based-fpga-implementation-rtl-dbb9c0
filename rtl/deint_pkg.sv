// deint_pkg: types and constants shared by the WiMAX (IEEE 802.16e) channel
// deinterleaver and its address generator.
//
// The column count d = 16 and the largest block depth of 576 bits come from
// the interleaver definition the design follows. The encodings of modulation
// and code rate are this design's own choice.
package deint_pkg;

  // Number of interleaver columns (d).
  localparam int unsigned D_COLS     = 16;
  // Largest interleaver depth Ncbps in bits.
  localparam int unsigned NCBPS_MAX  = 576;

  localparam int unsigned NCBPS_W    = $clog2(NCBPS_MAX + 1);      // 10
  localparam int unsigned ADDR_W     = $clog2(NCBPS_MAX);          // 10
  localparam int unsigned COL_W      = $clog2(NCBPS_MAX / D_COLS); // 6
  localparam int unsigned ROW_W      = $clog2(D_COLS);             // 4

  // Modulation type; also the select of the column-term multiplexer.
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_QAM16 = 2'd1,
    MOD_QAM64 = 2'd2
  } mod_t;

  // Code rate of the forward error correction.
  typedef enum logic [1:0] {
    RATE_1_2 = 2'd0,
    RATE_2_3 = 2'd1,
    RATE_3_4 = 2'd2
  } rate_t;

endpackage
