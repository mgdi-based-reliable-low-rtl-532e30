// mbist_top: reversible-SRAM memory with DMC error correction and a
// low-power clock-splitting memory BIST.
//
// Datapath: a DW-bit word (32 by default) goes through the DMC encoder into
// a ROWS x DW information SRAM and a redundancy SRAM (36 bits wide by
// default) built from reversible (Fredkin/Feynman) cells; reads go through
// the syndrome/locator/corrector of the DMC decoder, which reuses the
// encoder. The code's matrix (K1 x K2 symbols of M bits, DW = K1*K2*M)
// defaults to the document's 32-bit example, 2 x 4 symbols of 4 bits; its
// stated choice of 2 x 8 (a 64-bit word) is K2 = 8. Test path: the BIST
// controller runs write/read passes with a background word and its
// complement, the clock-splitting LFSR (LDMLTLFSR) produces the addresses,
// the data generator the data, and the comparator checks the corrected
// read data and counts detected and corrected errors.
//
// Modes: `test_mode` high hands the memory to the BIST (`start` begins a
// test, `bist_done` ends it); low gives it to the functional port
// (func_addr/func_we/func_wdata, with corrected read data on func_rdata and
// the uncorrected word on func_rdata_raw).
// `flip_en`/`flip_addr`/`flip_mask` inject upsets into the word read from
// one address, in either mode; tie `flip_en` low in use.
//
// The block structure (address generator, data generator, controller,
// comparator, DMC-protected reversible SRAM) follows the document; the mode
// multiplexer, the fault-injection port and the status outputs are this
// design's own.
//
// Timing: one memory access per clock in both modes. The functional read
// is asynchronous (func_rdata follows func_addr within the cycle); the
// functional write takes effect in the cycle func_we is high. A BIST run
// takes 4 * ROWS + 1 clocks from the edge that samples `start`.
module mbist_top
  import mbist_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned CW   = 8,
  parameter int unsigned K1   = DMC_K1,  // DMC matrix rows
  parameter int unsigned K2   = DMC_K2,  // DMC matrix columns
  parameter int unsigned M    = DMC_M,   // bits per symbol
  localparam int unsigned AW  = $clog2(ROWS),
  localparam int unsigned K   = K1 * K2,
  localparam int unsigned DW  = K * M
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_mode,
  // BIST
  input  logic             start,
  input  logic [DW-1:0]    background,
  output bist_state_t      bist_state,
  output logic             bist_busy,
  output logic             bist_done,
  output logic             bist_fail,
  output logic [AW-1:0]    bist_fail_addr,
  output logic [CW-1:0]    bist_mismatch_cnt,
  output logic [CW-1:0]    bist_detect_cnt,
  output logic [CW-1:0]    bist_correct_cnt,
  // functional port
  input  logic [AW-1:0]    func_addr,
  input  logic             func_we,
  input  logic [DW-1:0]    func_wdata,
  output logic [DW-1:0]    func_rdata,
  output logic [DW-1:0]    func_rdata_raw,
  output logic             func_err,
  output logic [K-1:0]     func_sym_err,
  // fault injection
  input  logic             flip_en,
  input  logic [AW-1:0]    flip_addr,
  input  logic [DW-1:0]    flip_mask
);

  if (ROWS != (1 << AW)) begin : g_bad_rows
    $error("mbist_top: ROWS must be a power of two");
  end

  logic ag_init, ag_step, ag_last, mem_we_b, cmp_valid, cmp_clear, dg_load, inv;
  logic [AW-1:0] ag_addr, mem_addr;
  logic mem_we;
  logic [DW-1:0] pattern, mem_wdata, mem_rdata, mem_raw, mask;
  logic [K-1:0] sym_err;
  logic err;

  bist_controller u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start && test_mode),
    .addr_last(ag_last),
    .state    (bist_state),
    .busy     (bist_busy),
    .done     (bist_done),
    .ag_init  (ag_init),
    .ag_step  (ag_step),
    .mem_we   (mem_we_b),
    .cmp_valid(cmp_valid),
    .cmp_clear(cmp_clear),
    .dg_load  (dg_load),
    .inv      (inv)
  );

  ldmlt_addr_gen #(.N(AW)) u_agen (
    .clk  (clk),
    .rst_n(rst_n),
    .init (ag_init),
    .step (ag_step),
    .addr (ag_addr),
    .last (ag_last)
  );

  data_generator #(.WIDTH(DW)) u_dgen (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (dg_load),
    .bg_in  (background),
    .inv    (inv),
    .pattern(pattern)
  );

  // memory port: BIST or functional
  assign mem_addr  = test_mode ? ag_addr  : func_addr;
  assign mem_we    = test_mode ? mem_we_b : func_we;
  assign mem_wdata = test_mode ? pattern  : func_wdata;
  assign mask      = (flip_en && mem_addr == flip_addr) ? flip_mask : '0;

  ft_memory #(.ROWS(ROWS), .K1(K1), .K2(K2), .M(M)) u_mem (
    .addr     (mem_addr),
    .we       (mem_we),
    .wdata    (mem_wdata),
    .flip_mask(mask),
    .rdata    (mem_rdata),
    .rdata_raw(mem_raw),
    .sym_err  (sym_err),
    .err      (err)
  );

  comparator #(.WIDTH(DW), .AW(AW), .CW(CW)) u_cmp (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (cmp_clear),
    .valid       (cmp_valid && test_mode),
    .addr        (ag_addr),
    .expected    (pattern),
    .actual      (mem_rdata),
    .err         (err),
    .corrected   (|sym_err),
    .fail        (bist_fail),
    .fail_addr   (bist_fail_addr),
    .mismatch_cnt(bist_mismatch_cnt),
    .detect_cnt  (bist_detect_cnt),
    .correct_cnt (bist_correct_cnt)
  );

  assign func_rdata     = mem_rdata;
  assign func_rdata_raw = mem_raw;
  assign func_err     = err;
  assign func_sym_err = sym_err;

endmodule
