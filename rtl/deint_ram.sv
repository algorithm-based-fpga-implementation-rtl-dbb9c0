// deint_ram: one block buffer of the ping-pong deinterleaver memory.
//
// A single-port memory of DEPTH words of DW bits with one address A shared by
// writing and reading, as each of the two buffers of the deinterleaver has.
// On a rising clock edge with we_i high, din_i is stored at addr_i. The word
// at addr_i is read synchronously: dout_o shows it one clock after the
// address (read-before-write when both happen at once). Nothing is reset;
// reading a word that was never written returns whatever the array held.
//
// The ports follow the memory of the deinterleaver structure (D_IN, W_E, A,
// D_OUT); synchronous read and the word width are this design's choice.
module deint_ram #(
  parameter int unsigned DEPTH = 576,
  parameter int unsigned DW    = 1,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] addr_i,
  input  logic [DW-1:0] din_i,
  output logic [DW-1:0] dout_o
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[addr_i] <= din_i;
    dout_o <= mem[addr_i];
  end

endmodule
