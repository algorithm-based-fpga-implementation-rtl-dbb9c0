// tb_deint_row_counter: random enable and clear against a counter model.
//
// Drives en_i and clr_i at random and checks j_o and wrap_o (j = 15) every
// clock against a model of a modulo-16 counter.
module tb_deint_row_counter;
  import deint_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [ROW_W-1:0] j_val;
  logic wrap;
  int model = 0, checks = 0, failures = 0, wraps = 0;

  deint_row_counter dut (
    .clk (clk), .rst_n (rst_n), .en_i (en), .clr_i (clr),
    .j_o (j_val), .wrap_o (wrap)
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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    model = 0;
    repeat (2000) begin
      en  = ($urandom % 3) != 0;
      clr = ($urandom % 151) == 0;
      #1;
      checks++;
      if (int'(j_val) != model || wrap != (model == 15)) begin
        failures++;
        $display("FAIL j=%0d wrap=%0d, want %0d", j_val, wrap, model);
      end
      @(negedge clk);
      if (clr) model = 0;
      else if (en) begin
        if (model == 15) begin model = 0; wraps++; end
        else model++;
      end
    end
    checks++;
    if (wraps < 20) begin failures++; $display("FAIL only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
