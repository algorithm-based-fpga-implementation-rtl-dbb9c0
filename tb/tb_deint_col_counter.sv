// tb_deint_col_counter: random enable and clear against a counter model.
//
// For several moduli, including 6, 9, 27 and 36 (the smallest and largest
// column counts of the depth table), drives en_i and clr_i at random and
// checks i_o and wrap_o every clock against a model counter.
module tb_deint_col_counter;
  import deint_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [COL_W-1:0] cols = 6'd6, i_val;
  logic wrap;
  int model = 0, checks = 0, failures = 0, wraps = 0;

  deint_col_counter dut (
    .clk (clk), .rst_n (rst_n), .en_i (en), .clr_i (clr),
    .cols_i (cols), .i_o (i_val), .wrap_o (wrap)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int moduli[6] = '{6, 9, 12, 27, 36, 1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (moduli[q]) begin
      cols = 6'(moduli[q]);
      clr = 1'b1; @(negedge clk); clr = 1'b0; model = 0;
      repeat (400) begin
        en  = ($urandom % 4) != 0;
        clr = ($urandom % 97) == 0;
        #1;
        checks++;
        if (int'(i_val) != model || wrap != (model == moduli[q] - 1)) begin
          failures++;
          $display("FAIL cols=%0d i=%0d wrap=%0d, want %0d", moduli[q], i_val, wrap, model);
        end
        @(negedge clk);
        if (clr) model = 0;
        else if (en) begin
          if (model == moduli[q] - 1) begin model = 0; wraps++; end
          else model++;
        end
      end
    end
    checks++;
    if (wraps < 20) begin failures++; $display("FAIL only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
