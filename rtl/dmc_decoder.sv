// dmc_decoder: DMC syndrome calculator, error locator and corrector.
//
// Inputs are the information word and check bits read from memory, and
// the check bits recomputed from the read word by the (reused) encoder.
// Syndrome: for each horizontal field dH = H' - H (integer subtraction,
// M+1 bits), and S = V' ^ V for the vertical bits. Locator: the symbol in
// matrix row r, column c is in error when the dH of its horizontal field
// and the M S bits of column c are both non-zero. Corrector: an erroneous
// symbol is XORed with its column's S bits, which are exactly its flipped
// bits when only one symbol of that column is hit. This corrects any upset
// confined to one symbol, and a burst along one matrix row whose hit
// symbols each lie in a different horizontal field. Two hit symbols in one
// column are not corrected, and hits in different rows and columns can
// mislead the locator when an unhit symbol shares a field with one of them
// and a column with another.
//
// Syndrome by subtraction and XOR, locating by row/column intersection and
// correction by the vertical syndrome follow the document. The `err`
// (any non-zero syndrome, also for errors in the check bits themselves)
// and `sym_err` outputs are this design's own. Geometry parameters as in
// dmc_encoder. Purely combinational.
module dmc_decoder #(
  parameter int unsigned K1 = 2,
  parameter int unsigned K2 = 4,
  parameter int unsigned M  = 4,
  localparam int unsigned K  = K1 * K2,
  localparam int unsigned DW = K * M,
  localparam int unsigned NG = K1 * (K2 / 2),
  localparam int unsigned HW = NG * (M + 1),
  localparam int unsigned VW = K2 * M
) (
  input  logic [DW-1:0] d_rd,     // information word as read
  input  logic [HW-1:0] h_rd,     // stored horizontal bits
  input  logic [VW-1:0] v_rd,     // stored vertical bits
  input  logic [HW-1:0] h_re,     // horizontal bits recomputed from d_rd
  input  logic [VW-1:0] v_re,     // vertical bits recomputed from d_rd
  output logic [DW-1:0] d_corr,   // corrected word
  output logic [K-1:0]  sym_err,  // symbols that were corrected
  output logic          err       // any non-zero syndrome
);

  import mbist_pkg::dmc_group;
  import mbist_pkg::dmc_col;

  logic [HW-1:0] dh;
  logic [VW-1:0] s;
  logic [NG-1:0] dh_nz;

  always_comb begin
    for (int unsigned g = 0; g < NG; g++) begin
      dh[g*(M+1) +: M+1] = h_re[g*(M+1) +: M+1] - h_rd[g*(M+1) +: M+1];
      dh_nz[g] = (dh[g*(M+1) +: M+1] != '0);
    end
  end

  assign s = v_re ^ v_rd;

  always_comb begin
    d_corr = d_rd;
    for (int unsigned j = 0; j < K; j++) begin
      sym_err[j] = dh_nz[dmc_group(j, K2)] && (s[dmc_col(j, K2)*M +: M] != '0);
      if (sym_err[j])
        d_corr[j*M +: M] = d_rd[j*M +: M] ^ s[dmc_col(j, K2)*M +: M];
    end
  end

  assign err = (|dh_nz) | (|s);

endmodule
