// wimax_deinterleaver: IEEE 802.16e channel deinterleaver with ping-pong
// block memories and an arithmetic address generator.
//
// Received bits arrive one per accepted clock in interleaved order. Two block
// memories, M-1 and M-2, alternate roles under the bank select sel: with
// sel = 1 the incoming block is written into M-1 while the previous block is
// read out of M-2, and with sel = 0 the other way round. Each received bit n
// is written at the address kn from deint_addr_gen, its position in the
// original (deinterleaved) block, and a full bank is read out at linear
// addresses 0..Ncbps-1, so the output is in original order. The block depth
// Ncbps comes from deint_depth_table for the modulation, code rate and size
// row on the inputs at the first bit of each block.
//
// sel toggles when the write bank holds a complete block and the read bank
// has been read out (or is reading its last word that clock). If the reader
// is still busy when the writer completes a block, in_ready_o stays low until
// it finishes (a stall); with a continuous input stream and equal block
// sizes the design takes one bit every clock without a pause. A configuration
// outside the depth table raises cfg_err_o and blocks the input until it
// changes.
//
// Interface and timing: valid/ready input (in_valid_i, in_data_i,
// in_ready_o), valid-only output (out_valid_o, out_data_o, out_last_o) with
// no back-pressure. The first bit of a block leaves three clocks after the
// clock that accepted its last input bit: one clock for the registered
// address, one for the bank swap and read issue, one for the synchronous
// memory read. Reset is synchronous and active low and starts with sel = 1.
//
// The two memories, the address multiplexers driven by sel, the inverted
// write enable of M-2 and the output multiplexer follow the published
// interleaver/deinterleaver structure. Which side uses the generated
// address, the handshakes, the swap rule and the latency are this design's
// choices.
module wimax_deinterleaver
  import deint_pkg::*;
#(
  parameter int unsigned D     = D_COLS,
  parameter int unsigned DEPTH = NCBPS_MAX,
  parameter int unsigned DW    = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // block configuration, sampled at the first bit of each block
  input  mod_t          mod_i,
  input  rate_t         rate_i,
  input  logic [2:0]    size_i,
  // received, interleaved bits
  input  logic          in_valid_i,
  input  logic [DW-1:0] in_data_i,
  output logic          in_ready_o,
  // deinterleaved bits
  output logic          out_valid_o,
  output logic [DW-1:0] out_data_o,
  output logic          out_last_o,
  // status
  output logic          sel_o,
  output logic          cfg_err_o
);

  localparam int unsigned AW = ADDR_W;

  // ---- depth table ----------------------------------------------------------
  logic [NCBPS_W-1:0] tbl_ncbps;
  logic [COL_W-1:0]   tbl_cols;
  logic               tbl_valid;

  deint_depth_table #(.D(D)) u_depth_table (
    .mod_i   (mod_i),
    .rate_i  (rate_i),
    .size_i  (size_i),
    .ncbps_o (tbl_ncbps),
    .cols_o  (tbl_cols),
    .valid_o (tbl_valid)
  );

  // ---- write side: address generator ---------------------------------------
  logic              accept, ag_first, ag_last;
  logic [AW-1:0]     wr_addr;
  logic              wr_en, wr_last;
  logic [DW-1:0]     wr_data;
  logic              wr_full;          // write bank holds a complete block
  logic [NCBPS_W-1:0] wr_ncbps;        // depth of the block being written
  logic              swap;

  deint_addr_gen #(.D(D)) u_addr_gen (
    .clk        (clk),
    .rst_n      (rst_n),
    .en_i       (accept),
    .clr_i      (1'b0),
    .mod_i      (mod_i),
    .cols_i     (tbl_cols),
    .kn_o       (wr_addr),
    .kn_valid_o (wr_en),
    .kn_last_o  (wr_last),
    .first_o    (ag_first),
    .last_o     (ag_last)
  );

  assign cfg_err_o  = ag_first && !tbl_valid;
  assign in_ready_o = (!wr_full || swap) && !cfg_err_o;
  assign accept     = in_valid_i && in_ready_o;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_data  <= '0;
      wr_ncbps <= '0;
    end else if (accept) begin
      wr_data <= in_data_i;
      if (ag_first) wr_ncbps <= tbl_ncbps;
    end
  end

  // ---- read side: linear read address counter --------------------------------
  logic               rd_busy;         // read bank holds a block being read out
  logic [AW-1:0]      rd_addr;
  logic [NCBPS_W-1:0] rd_ncbps;
  logic               rd_at_last;
  logic               sel;

  assign rd_at_last = rd_busy && (NCBPS_W'(rd_addr) == rd_ncbps - NCBPS_W'(1));
  assign swap       = wr_full && (!rd_busy || rd_at_last);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel      <= 1'b1;
      wr_full  <= 1'b0;
      rd_busy  <= 1'b0;
      rd_addr  <= '0;
      rd_ncbps <= '0;
    end else begin
      // write bank bookkeeping
      if (swap)                   wr_full <= 1'b0;
      else if (accept && ag_last) wr_full <= 1'b1;
      // read bank bookkeeping
      if (swap) begin
        sel      <= !sel;
        rd_busy  <= 1'b1;
        rd_addr  <= '0;
        rd_ncbps <= wr_ncbps;
      end else if (rd_busy) begin
        if (rd_at_last) rd_busy <= 1'b0;
        rd_addr <= rd_addr + AW'(1);
      end
    end
  end

  // ---- the two block memories and their multiplexers ------------------------
  logic [AW-1:0] m1_addr, m2_addr;
  logic          m1_we,   m2_we;
  logic [DW-1:0] m1_dout, m2_dout;

  assign m1_addr = sel ? wr_addr : rd_addr;
  assign m2_addr = sel ? rd_addr : wr_addr;
  assign m1_we   = wr_en &&  sel;
  assign m2_we   = wr_en && !sel;

  deint_ram #(.DEPTH(DEPTH), .DW(DW), .AW(AW)) u_m1 (
    .clk    (clk),
    .we_i   (m1_we),
    .addr_i (m1_addr),
    .din_i  (wr_data),
    .dout_o (m1_dout)
  );

  deint_ram #(.DEPTH(DEPTH), .DW(DW), .AW(AW)) u_m2 (
    .clk    (clk),
    .we_i   (m2_we),
    .addr_i (m2_addr),
    .din_i  (wr_data),
    .dout_o (m2_dout)
  );

  // ---- output multiplexer -------------------------------------------------------
  logic rd_issue, rd_bank_q;

  assign rd_issue = rd_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      out_last_o  <= 1'b0;
      rd_bank_q   <= 1'b0;
    end else begin
      out_valid_o <= rd_issue;
      out_last_o  <= rd_at_last;
      rd_bank_q   <= sel;          // sel = 1: M-2 is the read bank
    end
  end

  assign out_data_o = rd_bank_q ? m2_dout : m1_dout;
  assign sel_o      = sel;

  // ---- protocol checks ----------------------------------------------------------
  // A write never reaches past the depth of its block, and the last write
  // of a block always lands at the end of the write bank's bookkeeping.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!wr_en || NCBPS_W'(wr_addr) < wr_ncbps)
        else $error("write address %0d outside block of %0d", wr_addr, wr_ncbps);
      assert (!wr_last || wr_full)
        else $error("last write of a block without the bank marked full");
    end
  end

endmodule
