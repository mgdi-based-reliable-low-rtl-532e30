// gdi_sram: ROWS x WIDTH static RAM built from reversible SRAM cells.
//
// A row decoder turns the address into word lines; while `we` is high the
// selected row's word line is high and its cells take `wdata`. Reading is
// asynchronous: the addressed row's cell outputs (which are complemented,
// see rev_sram_cell) are selected and inverted back into `rdata`.
//
// The array of reversible cells driven by a 5x32 row decoder follows the
// document. The document's array figure shows 32 rows of 8 cells while
// its simulation uses a 32 x 32 memory; WIDTH is a parameter and the
// top-level instances set it to the 32-bit information word and to the
// 36 redundant bits. The read multiplexer and inverting sense path are this
// design's own choices.
//
// Timing: like a latch-based SRAM macro, `addr` and `wdata` must be stable
// while `we` is high; driven from flip-flops of the same clock, a write
// completes within the cycle in which `we` is high. Every cell is a latch
// by design.
module gdi_sram #(
  parameter int unsigned ROWS  = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(ROWS)
) (
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [(1<<AW)-1:0] wl;
  logic [WIDTH-1:0]   bit_n [ROWS];

  addr_decoder #(.A(AW)) u_dec (
    .addr(addr),
    .en  (we),
    .row (wl)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < WIDTH; c++) begin : g_col
      rev_sram_cell u_cell (
        .wl   (wl[r]),
        .din  (wdata[c]),
        .bit_n(bit_n[r][c])
      );
    end
  end

  always_comb begin
    rdata = '0;
    for (int r = 0; r < ROWS; r++)
      if (AW'(r) == addr) rdata = ~bit_n[r];
  end

endmodule
