// dmc_encoder: decimal matrix code (DMC) encoder.
//
// The K1*K2*M-bit word is divided into K1*K2 symbols of M bits (symbol j =
// D[M*j+M-1:M*j]) arranged row by row as a K1 x K2 matrix. Horizontal
// check bits are integer ("decimal") sums of symbol pairs of a row: the
// symbol in column c is added to the one in column c + K2/2, giving one
// (M+1)-bit field per pair, fields ordered by row, then by c. Vertical
// check bits are the XOR over all rows of each bit column. For the default
// 32-bit word (2 x 4, M = 4):
//   H[4:0]   = sym0 + sym2     H[9:5]   = sym1 + sym3
//   H[14:10] = sym4 + sym6     H[19:15] = sym5 + sym7
//   V[i]     = D[i] ^ D[i+16], i = 0..15
// The unchanged data bits are the third output group (U in the fault
// tolerant unit). Purely combinational. The same encoder serves as the
// syndrome generator during reads (encoder reuse, see ft_memory).
//
// The symbol split, the row sums and column XORs, the 2 x 4 / 4-bit
// default and its check-bit counts (H0..H19, V0..V15) follow the
// document's 32-bit example, as do the pairs (0,2) and (5,7). The pairs
// (1,3) and (4,6), the field order and the rule for other geometries are
// this design's reading of that example. K2 must be even.
module dmc_encoder #(
  parameter int unsigned K1 = 2,
  parameter int unsigned K2 = 4,
  parameter int unsigned M  = 4,
  localparam int unsigned DW = K1 * K2 * M,
  localparam int unsigned HW = K1 * (K2 / 2) * (M + 1),
  localparam int unsigned VW = K2 * M
) (
  input  logic [DW-1:0] d,
  output logic [HW-1:0] h,
  output logic [VW-1:0] v,
  output logic [DW-1:0] u
);

  import mbist_pkg::dmc_group;

  if (K2 < 2 || K2 % 2 != 0) begin : g_bad_k2
    $error("dmc_encoder: K2 must be even");
  end

  always_comb begin
    h = '0;
    for (int unsigned s = 0; s < K1 * K2; s++) begin
      // each horizontal field is the sum of its two symbols
      h[dmc_group(s, K2)*(M+1) +: M+1] += (M+1)'(d[s*M +: M]);
    end
  end

  always_comb begin
    v = '0;
    for (int unsigned r = 0; r < K1; r++)
      v = v ^ d[r*VW +: VW];
  end

  assign u = d;

endmodule
