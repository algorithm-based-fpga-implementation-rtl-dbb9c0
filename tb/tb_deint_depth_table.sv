// tb_deint_depth_table: exhaustive check of the depth table.
//
// Applies every code of modulation (0..3), rate (0..3) and size row (0..7)
// and compares depth, column count and valid flag with the explicit list of
// the reference package. Also checks that exactly 19 combinations are valid.
module tb_deint_depth_table;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  logic [1:0] mod_c, rate_c;
  logic [2:0] size_c;
  logic [NCBPS_W-1:0] ncbps;
  logic [COL_W-1:0]   cols;
  logic               valid;
  int checks = 0, failures = 0, n_valid = 0;

  deint_depth_table dut (
    .mod_i   (mod_t'(mod_c)),
    .rate_i  (rate_t'(rate_c)),
    .size_i  (size_c),
    .ncbps_o (ncbps),
    .cols_o  (cols),
    .valid_o (valid)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int r = 0; r < 4; r++)
        for (int z = 0; z < 8; z++) begin
          int exp_n;
          mod_c = 2'(m); rate_c = 2'(r); size_c = 3'(z);
          #1;
          exp_n = ref_ncbps(m, r, z);
          checks++;
          if (valid !== (exp_n != 0) || (exp_n != 0 && (int'(ncbps) != exp_n || int'(cols) != exp_n / 16))) begin
            failures++;
            $display("FAIL mod=%0d rate=%0d size=%0d: got valid=%0d ncbps=%0d cols=%0d, want %0d",
                     m, r, z, valid, ncbps, cols, exp_n);
          end
          if (valid) n_valid++;
        end
    checks++;
    if (n_valid != 19) begin
      failures++;
      $display("FAIL %0d valid combinations, want 19", n_valid);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
