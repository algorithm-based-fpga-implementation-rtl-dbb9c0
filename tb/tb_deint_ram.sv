// tb_deint_ram: write and read back a full 576 x 1 memory.
//
// Writes a random pattern to every address in a random order, then reads
// all addresses back, checking that dout_o shows the stored word exactly one
// clock after the address. A final phase mixes writes and reads at random
// addresses against a model array, checking read-before-write.
module tb_deint_ram;
  logic clk = 1'b0, we = 1'b0;
  logic [9:0] addr = '0;
  logic [0:0] din = '0, dout;
  logic [0:0] model [576];
  int checks = 0, failures = 0;

  deint_ram dut (.clk (clk), .we_i (we), .addr_i (addr), .din_i (din), .dout_o (dout));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[576];
    foreach (order[a]) order[a] = a;
    order.shuffle();
    @(negedge clk);
    foreach (order[a]) begin
      we = 1'b1; addr = 10'(order[a]); din = 1'($urandom); model[order[a]] = din;
      @(negedge clk);
    end
    we = 1'b0;
    for (int a = 0; a < 576; a++) begin
      addr = 10'(a);
      @(negedge clk);
      checks++;
      if (dout != model[a]) begin failures++; $display("FAIL addr %0d", a); end
    end
    repeat (2000) begin
      logic [0:0] want;
      int a = $urandom % 576;
      we = 1'($urandom); addr = 10'(a); din = 1'($urandom);
      want = model[a];
      if (we) model[a] = din;
      @(negedge clk);
      checks++;
      if (dout != want) begin failures++; $display("FAIL mixed addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
