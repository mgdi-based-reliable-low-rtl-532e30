// rev_sram_cell: one-bit reversible-logic SRAM cell (Fredkin + Feynman).
//
// A 3x3 Fredkin gate (controlled swap) takes the word line WL as its
// control, the cell's own fed-back value and the data input. Its output
// that carries "WL ? data : stored" drives a 2x2 Feynman gate whose second
// input is tied to 1. The Feynman gate's pass-through output closes the
// storage loop; its XOR output (stored XOR 1) is the cell's bit line
// output, so `bit_n` is the complement of the stored value.
//
// The loop is level sensitive: the cell is a latch that is transparent
// while WL is high and holds while WL is low. It is written as a latch on
// purpose (the document's cell is a latch), so the latch a lint or
// synthesis tool reports here is intended.
//
// The gate structure, the inputs WL and Data Input, the constant 1 and the
// "bit" output follow the document. The textbook Fredkin/Feynman
// functions, which Fredkin output feeds the Feynman gate and the
// complemented output are this design's reading of the cell; the
// transistor-level gate diffusion input (GDI) gates are not modelled.
module rev_sram_cell (
  input  logic wl,      // word line: write while high
  input  logic din,     // data input
  output logic bit_n    // complemented stored value
);

  // Fredkin gate (P = A, Q = A ? C : B, R = A ? B : C): only its Q output
  // is used by the cell, P and R are garbage outputs of the reversible gate
  function automatic logic fredkin_q(logic a, logic b, logic c);
    return a ? c : b;
  endfunction

  // Feynman gate (P = A, Q = A ^ B): P is the fed-back stored value, Q the
  // bit output
  function automatic logic feynman_q(logic a, logic b);
    return a ^ b;
  endfunction

  logic stored;

  // While WL is high, Fredkin Q equals the data input and the loop is
  // transparent; while WL is low the latch holds its fed-back value. The
  // latch is that feedback, so the Fredkin B input (only selected while WL
  // is low) is tied off here rather than wired as a combinational loop.
  always_latch begin
    if (wl) stored = fredkin_q(wl, 1'b0, din);
  end

  assign bit_n = feynman_q(stored, 1'b1);

endmodule
