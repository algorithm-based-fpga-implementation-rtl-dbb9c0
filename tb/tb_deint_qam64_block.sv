// tb_deint_qam64_block: exhaustive check of the 64-QAM column term.
//
// For every 64-QAM column count of the depth table (18, 24, 27, 36) and every
// grid position (row j, column i), the address d*col_o + j must equal the
// standard's deinterleaver permutation of received bit n = j*cols + i,
// computed by the reference package with s = 3.
module tb_deint_qam64_block;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  logic [COL_W-1:0] i_v, col;
  logic [ROW_W-1:0] j_v;
  int checks = 0, failures = 0;

  deint_qam64_block dut (.i_i (i_v), .j_i (j_v), .col_o (col));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int col_counts[4] = '{18, 24, 27, 36};
    foreach (col_counts[q]) begin
      int c = col_counts[q];
      for (int j = 0; j < 16; j++)
        for (int i = 0; i < c; i++) begin
          int want;
          i_v = COL_W'(i); j_v = ROW_W'(j);
          #1;
          want = ref_deinterleave(16 * c, 3, j * c + i);
          checks++;
          if (16 * int'(col) + j != want) begin
            failures++;
            if (failures < 20)
              $display("FAIL cols=%0d j=%0d i=%0d: col=%0d gives %0d, want %0d",
                       c, j, i, col, 16 * int'(col) + j, want);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
