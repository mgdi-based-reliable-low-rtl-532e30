// addr_decoder: A-to-2^A one-hot row decoder (5 x 32 for the 32-row array).
//
// Output bit r is high when `en` is high and `addr` equals r; with `en`
// low all outputs are low. It drives the word lines of the SRAM array.
// The decoder size follows the document's array; the enable input is this
// design's own choice (it gates the word lines with the write strobe).
// Purely combinational.
module addr_decoder #(
  parameter int unsigned A = 5
) (
  input  logic [A-1:0]      addr,
  input  logic              en,
  output logic [(1<<A)-1:0] row
);

  always_comb begin
    row = '0;
    if (en) row[addr] = 1'b1;
  end

endmodule
