// deint_addr_gen: address generator of the IEEE 802.16e channel deinterleaver.
//
// The standard defines the deinterleaver address of received bit n by two
// permutations with floor and modulo operations. Arranged as a d x (Ncbps/d)
// grid, with row j = 0..d-1 and column i = 0..Ncbps/d-1 and n = j*(Ncbps/d)+i,
// the address reduces to kn = d*col + j, where col depends only on i, j and
// the modulation:
//   QPSK:   col = i
//   16-QAM: col = i with bit 0 inverted on odd rows         (deint_qam16_block)
//   64-QAM: col = i rotated within its group of three by j   (deint_qam64_block)
// so no floor function or division is needed. A column counter (inner loop)
// and a row counter (outer loop) walk the grid; the three column terms are
// formed in parallel, a multiplexer selected by the modulation picks one, a
// multiplier scales it by d and an adder adds j. For QPSK the column term is
// the counter value itself, so that input of the multiplexer is a plain wire.
//
// Interface and timing: each clock with en_i high consumes one address
// position. kn_o is registered: it holds the address of that position on the
// next clock, marked by kn_valid_o, and kn_last_o marks the last address of a
// block (position Ncbps-1). first_o is high while the counters sit at the
// start of a block; last_o while they sit at its final position. The
// modulation and the column count cols_i = Ncbps/d are taken from the inputs
// at the first position of a block and held until it ends. clr_i abandons the
// current block. Reset is synchronous and active low.
//
// The grid, the three column rules and the mux/multiply/add structure follow
// the published algorithm; the output register, the configuration hold and
// the clear input are this design's choices.
module deint_addr_gen
  import deint_pkg::*;
#(
  parameter int unsigned D = D_COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,
  input  logic              clr_i,
  input  mod_t              mod_i,
  input  logic [COL_W-1:0]  cols_i,
  output logic [ADDR_W-1:0] kn_o,
  output logic              kn_valid_o,
  output logic              kn_last_o,
  output logic              first_o,
  output logic              last_o
);

  // ---- configuration held for the duration of a block --------------------
  mod_t             mod_q, mod_eff;
  logic [COL_W-1:0] cols_q, cols_eff;

  // ---- counters -----------------------------------------------------------
  logic [COL_W-1:0] i_cnt;
  logic [ROW_W-1:0] j_cnt;
  logic             col_wrap, row_wrap;

  assign first_o  = (i_cnt == '0) && (j_cnt == '0);
  assign last_o   = col_wrap && row_wrap;
  assign mod_eff  = first_o ? mod_i  : mod_q;
  assign cols_eff = first_o ? cols_i : cols_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mod_q  <= MOD_QPSK;
      cols_q <= '0;
    end else if (en_i && first_o) begin
      mod_q  <= mod_eff;
      cols_q <= cols_eff;
    end
  end

  deint_col_counter #(.COL_W_P(COL_W)) u_col_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .en_i   (en_i),
    .clr_i  (clr_i),
    .cols_i (cols_eff),
    .i_o    (i_cnt),
    .wrap_o (col_wrap)
  );

  deint_row_counter #(.D(D), .ROW_W_P(ROW_W)) u_row_counter (
    .clk    (clk),
    .rst_n  (rst_n),
    .en_i   (en_i && col_wrap),
    .clr_i  (clr_i),
    .j_o    (j_cnt),
    .wrap_o (row_wrap)
  );

  // ---- column terms of the three modulations -----------------------------
  logic [COL_W-1:0] col_qpsk, col_qam16, col_qam64, col_sel;

  assign col_qpsk = i_cnt;  // QPSK: kn = d*i + j

  deint_qam16_block #(.COL_W_P(COL_W), .ROW_W_P(ROW_W)) u_qam16 (
    .i_i   (i_cnt),
    .j_i   (j_cnt),
    .col_o (col_qam16)
  );

  deint_qam64_block #(.COL_W_P(COL_W), .ROW_W_P(ROW_W)) u_qam64 (
    .i_i   (i_cnt),
    .j_i   (j_cnt),
    .col_o (col_qam64)
  );

  // ---- M6: column-term multiplexer, selected by the modulation -----------
  always_comb begin
    unique case (mod_eff)
      MOD_QAM16: col_sel = col_qam16;
      MOD_QAM64: col_sel = col_qam64;
      default:   col_sel = col_qpsk;
    endcase
  end

  // ---- ML3: multiply by d; A6: add the row index --------------------------
  logic [ADDR_W-1:0] prod, kn_next;

  assign prod    = ADDR_W'(col_sel) * ADDR_W'(D);
  assign kn_next = prod + ADDR_W'(j_cnt);

  // ---- output register ----------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n || clr_i) begin
      kn_o       <= '0;
      kn_valid_o <= 1'b0;
      kn_last_o  <= 1'b0;
    end else begin
      kn_valid_o <= en_i;
      kn_last_o  <= en_i && last_o;
      if (en_i) kn_o <= kn_next;
    end
  end

endmodule
