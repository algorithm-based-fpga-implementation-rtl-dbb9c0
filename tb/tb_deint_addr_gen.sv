// tb_deint_addr_gen: address sequence of every depth-table configuration.
//
// For each of the 19 entries of the depth table the generator is enabled
// on a random three clocks out of four, and every address is compared with
// the standard's deinterleaver permutation from the reference package,
// including the kn_last_o flag and the one-clock latency from en_i to
// kn_valid_o. While a block runs, the modulation and column inputs are
// scrambled to show that the block keeps the configuration it started with.
// The first four rows and five columns of the three example blocks of the
// algorithm description (96-bit QPSK 1/2, 192-bit 16-QAM 1/2 and 576-bit
// 64-QAM 3/4) are also checked against their printed values.
module tb_deint_addr_gen;
  import deint_pkg::*;
  import deint_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  mod_t mod_in = MOD_QPSK;
  logic [COL_W-1:0]  cols_in = '0;
  logic [ADDR_W-1:0] kn;
  logic kn_valid, kn_last, first, last;
  int checks = 0, failures = 0;

  deint_addr_gen dut (
    .clk (clk), .rst_n (rst_n), .en_i (en), .clr_i (1'b0),
    .mod_i (mod_in), .cols_i (cols_in),
    .kn_o (kn), .kn_valid_o (kn_valid), .kn_last_o (kn_last),
    .first_o (first), .last_o (last)
  );

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // printed example rows: [example][row][column]
  int table2 [3][4][5] = '{
    '{'{0, 16, 32, 48, 64}, '{1, 17, 33, 49, 65}, '{2, 18, 34, 50, 66}, '{3, 19, 35, 51, 67}},
    '{'{0, 16, 32, 48, 64}, '{17, 1, 49, 33, 81}, '{2, 18, 34, 50, 66}, '{19, 3, 51, 35, 83}},
    '{'{0, 16, 32, 48, 64}, '{17, 33, 1, 65, 81}, '{34, 2, 18, 82, 50}, '{3, 19, 35, 51, 67}}
  };

  int got [576];

  // Runs one block; returns the captured addresses in got[].
  task automatic run_block(input int m, input int ncbps);
    int n_in = 0, n_out = 0, c = ncbps / 16;
    bit en_prev = 0;
    while (n_out < ncbps) begin
      @(negedge clk);
      // check what the last rising edge produced
      checks++;
      if (kn_valid != en_prev) begin
        failures++; $display("FAIL latency: kn_valid=%0d after en=%0d", kn_valid, en_prev);
      end
      if (kn_valid) begin
        int want = ref_deinterleave(ncbps, ref_s(m), n_out);
        got[n_out] = int'(kn);
        checks++;
        if (int'(kn) != want || kn_last != (n_out == ncbps - 1)) begin
          failures++;
          if (failures < 20)
            $display("FAIL mod=%0d ncbps=%0d n=%0d: kn=%0d last=%0d, want %0d", m, ncbps, n_out, kn, kn_last, want);
        end
        n_out++;
      end
      // drive the next clock
      if (n_in < ncbps) begin
        en = ($urandom % 4) != 0;
        if (n_in == 0) begin
          mod_in = mod_t'(m); cols_in = COL_W'(c);
        end else begin
          mod_in = mod_t'($urandom % 3); cols_in = COL_W'($urandom);
        end
        #1;
        checks++;
        if (first != (n_in == 0) || last != (n_in == ncbps - 1)) begin
          failures++; $display("FAIL first/last flags at n=%0d", n_in);
        end
        if (en) n_in++;
      end else en = 1'b0;
      en_prev = en;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < 3; m++)
      for (int r = 0; r < 3; r++)
        for (int z = 0; z < 6; z++) begin
          int ncbps = ref_ncbps(m, r, z);
          if (ncbps == 0) continue;
          run_block(m, ncbps);
          // printed example rows
          if ((m == 0 && ncbps == 96 && r == 0) || (m == 1 && ncbps == 192 && r == 0) ||
              (m == 2 && ncbps == 576 && r == 2)) begin
            int e = m, c = ncbps / 16;
            for (int j = 0; j < 4; j++)
              for (int i = 0; i < 5; i++) begin
                checks++;
                if (got[j * c + i] != table2[e][j][i]) begin
                  failures++;
                  $display("FAIL example %0d row %0d col %0d: %0d, printed %0d", e, j, i, got[j * c + i], table2[e][j][i]);
                end
              end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
