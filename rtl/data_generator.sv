// data_generator: test data background for the memory self-test.
//
// Holds a WIDTH-bit background word, captured from `bg_in` when `load` is
// high, and presents it either true or complemented (`inv`) as the data
// to be written and expected back. Writing the background and then its
// complement makes every cell store both a 0 and a 1 during one test.
//
// The block is named in the document's MBIST structure and its example run
// uses a 32-bit pattern (F5AFF6AC); the background register and the
// true/complement scheme are this design's own choices.
//
// Timing: `pattern` follows `inv` combinationally and the stored
// background one cycle after `load`.
module data_generator #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] bg_in,
  input  logic             inv,
  output logic [WIDTH-1:0] pattern
);

  logic [WIDTH-1:0] bg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    bg <= '0;
    else if (load) bg <= bg_in;
  end

  assign pattern = inv ? ~bg : bg;

endmodule
