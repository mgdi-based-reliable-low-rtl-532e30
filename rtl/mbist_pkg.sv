// mbist_pkg: types and constants shared by the DMC-protected memory and
// its built-in self-test.
//
// Decimal matrix code (DMC) geometry: a word of K1*K2*M bits is cut into
// K1*K2 symbols of M bits, placed row by row in a logical K1 x K2 matrix
// (symbol j sits in row j / K2, column j % K2). In each row, the symbol in
// column c and the one in column c + K2/2 are added as integers into an
// (M+1)-bit horizontal check field; each bit column is XORed over all K1
// rows into a vertical check bit. That gives K1*(K2/2)*(M+1) horizontal
// and K2*M vertical bits. The constants below are the default geometry,
// the 32-bit word as a 2 x 4 matrix of 4-bit symbols (20 + 16 check bits);
// the encoder and decoder take the geometry as parameters.
package mbist_pkg;

  // ---- DMC geometry ---------------------------------------------------
  localparam int unsigned DMC_DATA_W = 32;          // information bits
  localparam int unsigned DMC_M      = 4;           // bits per symbol
  localparam int unsigned DMC_K1     = 2;           // matrix rows
  localparam int unsigned DMC_K2     = 4;           // matrix columns
  localparam int unsigned DMC_K      = DMC_K1 * DMC_K2;     // symbols
  localparam int unsigned DMC_HW     = DMC_M + 1;   // width of one sum
  localparam int unsigned DMC_NGRP   = DMC_K / 2;   // horizontal fields
  localparam int unsigned DMC_H_W    = DMC_NGRP * DMC_HW;   // 20
  localparam int unsigned DMC_V_W    = DMC_K2 * DMC_M;      // 16

  typedef logic [DMC_DATA_W-1:0] dmc_data_t;
  typedef logic [DMC_H_W-1:0]    dmc_h_t;
  typedef logic [DMC_V_W-1:0]    dmc_v_t;

  // Horizontal field a symbol belongs to in a matrix of k2 columns:
  // columns c and c + k2/2 of the same row share a field.
  function automatic int unsigned dmc_group(int unsigned sym, int unsigned k2);
    return (sym / k2) * (k2 / 2) + (sym % k2) % (k2 / 2);
  endfunction

  // Matrix column of a symbol (selects its vertical check bits).
  function automatic int unsigned dmc_col(int unsigned sym, int unsigned k2);
    return sym % k2;
  endfunction

  // ---- BIST sequencing --------------------------------------------------
  // Phases of one self-test: write the background, read and compare it,
  // write its complement, read and compare that.
  typedef enum logic [2:0] {
    BIST_IDLE   = 3'd0,
    BIST_WRITE0 = 3'd1,
    BIST_READ0  = 3'd2,
    BIST_WRITE1 = 3'd3,
    BIST_READ1  = 3'd4,
    BIST_DONE   = 3'd5
  } bist_state_t;

endpackage
