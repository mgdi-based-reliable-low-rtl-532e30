// mlt_lfsr: W-bit Fibonacci LFSR with characteristic polynomial 1+x+x^W,
// extended to visit all 2^W states.
//
// Stage R[i] shifts into R[i-1] and the top stage R[W-1] takes the XOR of
// R[W-1] and R[0] (the feedback of the 4-bit example register). A second
// XOR term, set when R[W-1:1] are all zero, splices the all-zero state
// into the sequence, so the register walks all 2^W values, which an
// address generator must do to reach every row. 1+x+x^W is primitive for
// W = 2, 3, 4, 6, 7, 15, ...; other widths give shorter cycles.
//
// The polynomial, the shift direction and the single-XOR feedback follow
// the document. The all-zero state insertion, the seed and the `last`
// flag are this design's own choices.
//
// Interface (W >= 2): `en` advances one state on the rising clock edge; `load`
// (priority) restores SEED. `last` is high in the state that precedes SEED.
module mlt_lfsr #(
  parameter int unsigned W = 3,
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low: state = SEED
  input  logic         load,
  input  logic         en,
  output logic [W-1:0] q,
  output logic         last
);

  logic [W-1:0] nxt;

  if (W < 2) begin : g_bad_width
    $error("mlt_lfsr: W must be at least 2");
  end

  // next-state function, also used to find the state before SEED
  function automatic logic [W-1:0] next_state(logic [W-1:0] r);
    logic f;
    f = r[W-1] ^ r[0] ^ (r[W-1:1] == '0);
    return {f, r[W-1:1]};
  endfunction

  assign nxt  = next_state(q);
  assign last = (nxt == SEED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (load) q <= SEED;
    else if (en)   q <= nxt;
  end

endmodule
