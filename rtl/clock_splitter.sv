// clock_splitter: two-flip-flop clock splitting ring.
//
// FF1 takes the inverted output of FF2 and FF2 takes the output of FF1, so
// the pair steps through Q1Q2 = 00, 10, 11, 01 and repeats: each output is
// the input clock divided by four, the two outputs a quarter period apart,
// and only one of them changes per step. The pair is used two ways in this
// design: Q1/Q2 form the two most significant address bits of the
// clock-splitting address generator, and `wrap` (one enable pulse every
// fourth step, while the ring leaves state 01) is the divided clock that
// advances the lower (N-2)-bit LFSR.
//
// The ring with an inverter in its feedback and the use of Q1/Q2 as split
// clocks follow the document. Clocking the ring by an enable (`ce`) on one
// clock instead of gating the clock itself, the reset value 00, the synchronous clear and the
// `wrap` output are this design's own choices.
//
// Timing: q1/q2 change on the rising clk edge after ce=1; wrap is
// combinational from the current state and ce.
module clock_splitter (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low: Q1Q2 = 00
  input  logic clr,     // synchronous return to 00 (priority over ce)
  input  logic ce,      // step enable (the undivided clock)
  output logic q1,
  output logic q2,
  output logic wrap     // ce while in state 01: divided-by-four enable
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else if (clr) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else if (ce) begin
      q1 <= ~q2;
      q2 <= q1;
    end
  end

  assign wrap = ce & ~q1 & q2;

endmodule
