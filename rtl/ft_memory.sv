// ft_memory: fault tolerant memory with DMC and encoder reuse.
//
// An information SRAM (ROWS x DW) and a redundancy SRAM (ROWS x HW+VW,
// 32 and 36 bits for the default 2 x 4 matrix of 4-bit symbols) are
// addressed together. One DMC encoder serves both directions (encoder
// reuse): while `we` is high it encodes `wdata` and its horizontal and
// vertical bits are written to the redundancy SRAM; otherwise it encodes
// the word read from the information SRAM, and its outputs are the
// recomputed check bits from which the decoder forms the syndrome. The
// encoder enable of the document is therefore the inverted write strobe.
//
// `flip_mask` is XORed into the information word on its way out of the
// SRAM; it models cell upsets (single or multiple) at one address for
// testing and should be tied to zero in use.
//
// Encoder reuse, the split into information and redundancy SRAMs and the
// decoder chain (syndrome, locator, corrector) follow the document. The
// fault-injection input and the asynchronous read (inherited from
// gdi_sram) are this design's own.
//
// Timing: write as gdi_sram (inputs stable while `we` is high); read data,
// `rdata`, `sym_err` and `err` are combinational from `addr`.
module ft_memory #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned K1   = 2,   // DMC matrix rows
  parameter int unsigned K2   = 4,   // DMC matrix columns
  parameter int unsigned M    = 4,   // bits per symbol
  localparam int unsigned AW  = $clog2(ROWS),
  localparam int unsigned K   = K1 * K2,
  localparam int unsigned DW  = K * M,
  localparam int unsigned HW  = K1 * (K2 / 2) * (M + 1),
  localparam int unsigned VW  = K2 * M
) (
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  input  logic [DW-1:0] flip_mask,
  output logic [DW-1:0] rdata,      // corrected word
  output logic [DW-1:0] rdata_raw,  // word as read, uncorrected
  output logic [K-1:0]  sym_err,
  output logic          err
);

  // redundant part of a code word as stored in the redundancy SRAM
  typedef struct packed {
    logic [HW-1:0] h;
    logic [VW-1:0] v;
  } red_t;

  logic [DW-1:0] info_rd, enc_in, enc_u;
  red_t          red_wr, red_rd;
  logic [HW-1:0] enc_h;
  logic [VW-1:0] enc_v;

  gdi_sram #(.ROWS(ROWS), .WIDTH(DW)) u_info (
    .addr (addr),
    .we   (we),
    .wdata(wdata),
    .rdata(info_rd)
  );

  assign rdata_raw = info_rd ^ flip_mask;

  // encoder reuse: the write strobe selects what the encoder sees
  assign enc_in = we ? wdata : rdata_raw;

  dmc_encoder #(.K1(K1), .K2(K2), .M(M)) u_enc (
    .d(enc_in),
    .h(enc_h),
    .v(enc_v),
    .u(enc_u)
  );

  assign red_wr = '{h: enc_h, v: enc_v};

  gdi_sram #(.ROWS(ROWS), .WIDTH(HW + VW)) u_red (
    .addr (addr),
    .we   (we),
    .wdata(red_wr),
    .rdata(red_rd)
  );

  dmc_decoder #(.K1(K1), .K2(K2), .M(M)) u_dec (
    .d_rd   (enc_u),
    .h_rd   (red_rd.h),
    .v_rd   (red_rd.v),
    .h_re   (enc_h),
    .v_re   (enc_v),
    .d_corr (rdata),
    .sym_err(sym_err),
    .err    (err)
  );

endmodule
