// ldmlt_addr_gen: clock-splitting address generator (LDMLTLFSR).
//
// The N-bit address is split into a 2-bit upper part and an (N-2)-bit
// lower part that are clocked separately. The upper part is the two-flop
// clock-splitting ring (Q1 is address bit N-1, Q2 bit N-2); it steps on
// every `step` and changes one bit per step. The lower part is a modified
// LFSR (polynomial 1+x+x^(N-2), all 2^(N-2) states) whose clock is divided
// by four: it advances only when the ring wraps. Each lower-part flip-flop
// therefore toggles at most once every four addresses, and the sequence
// still covers all 2^N addresses once in 2^N steps. The address then
// repeats.
//
// The split into (N-2) and 2 bits, the separate clocks, Q1/Q2 as the MSBs
// and the divided clock for the lower part follow the document. The two
// parts run on two gated copies of `clk` (clock_gate cells): clock-2 pulses
// on every step, clock-1 once every four steps, and neither pulses while
// the generator is idle. The gating cells and the order in which the two
// parts advance are this design's own choices.
//
// Interface: `init` (synchronous, priority) returns to the first address
// {00, SEED}; `step` moves to the next address at the rising clock edge.
// `last` is high while the current address is the final one of the
// 2^N-step sequence. N-2 must be a width for which 1+x+x^(N-2) is
// primitive (N = 4, 5, 6, 8, 9, ...).
module ldmlt_addr_gen #(
  parameter int unsigned N = 5      // address bits: 32 rows
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         step,
  output logic [N-1:0] addr,
  output logic         last
);

  logic q1, q2, wrap;
  logic [N-3:0] lsb;
  logic lsb_last;
  logic clk2, clk1;

  // Clock-2 passes on every step; clock-1 only when the ring wraps, so the
  // (N-2)-bit register gets one clock pulse in four. Both pass on `init`.
  clock_gate u_cg2 (.clk(clk), .en(step | init), .gclk(clk2));
  // (the ring's enable is tied high under its gated clock, so its wrap
  // output marks state 01 and is qualified with `step` here)
  clock_gate u_cg1 (.clk(clk), .en((wrap & step) | init), .gclk(clk1));

  // clock-2 domain: 2-bit part, stepped every address
  clock_splitter u_msb (
    .clk  (clk2),
    .rst_n(rst_n),
    .clr  (init),
    .ce   (1'b1),
    .q1   (q1),
    .q2   (q2),
    .wrap (wrap)
  );

  // clock-1 domain: (N-2)-bit part, stepped by the divided clock
  mlt_lfsr #(.W(N-2)) u_lsb (
    .clk  (clk1),
    .rst_n(rst_n),
    .load (init),
    .en   (1'b1),
    .q    (lsb),
    .last (lsb_last)
  );

  assign addr = {q1, q2, lsb};
  assign last = lsb_last & ~q1 & q2;

endmodule
