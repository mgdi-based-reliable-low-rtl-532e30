// bist_controller: sequences one memory self-test.
//
// After `start` it runs four passes over all addresses, one address per
// clock: write the background, read and compare it, write the complement,
// read and compare that, then raises `done` until the next `start`. In each
// pass it steps the address generator every cycle and moves on when the
// generator flags the last address, restarting the generator for the next
// pass. In write passes it asserts `mem_we`; in read passes `cmp_valid`.
// `inv` selects the complemented background for the last two passes.
// With 2^N addresses a test takes 4 * 2^N cycles plus one to start.
//
// A BIST controller that drives the address generator, the memory's
// chip-select/write-enable and the comparator follows the document; the
// write/read background-and-complement sequence and every encoding are
// this design's own.
module bist_controller
  import mbist_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        addr_last,  // address generator is at its last address
  output bist_state_t state,
  output logic        busy,
  output logic        done,
  output logic        ag_init,    // restart the address sequence
  output logic        ag_step,    // advance the address
  output logic        mem_we,
  output logic        cmp_valid,
  output logic        cmp_clear,
  output logic        dg_load,    // capture the background
  output logic        inv
);

  bist_state_t nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= BIST_IDLE;
    else        state <= nxt;
  end

  always_comb begin
    nxt = state;
    unique case (state)
      BIST_IDLE, BIST_DONE: if (start)     nxt = BIST_WRITE0;
      BIST_WRITE0:          if (addr_last) nxt = BIST_READ0;
      BIST_READ0:           if (addr_last) nxt = BIST_WRITE1;
      BIST_WRITE1:          if (addr_last) nxt = BIST_READ1;
      BIST_READ1:           if (addr_last) nxt = BIST_DONE;
      default:                             nxt = BIST_IDLE;
    endcase
  end

  logic start_now;
  assign start_now = (state == BIST_IDLE || state == BIST_DONE) && start;

  assign busy      = !(state == BIST_IDLE || state == BIST_DONE);
  assign done      = (state == BIST_DONE);
  assign mem_we    = (state == BIST_WRITE0) || (state == BIST_WRITE1);
  assign cmp_valid = (state == BIST_READ0)  || (state == BIST_READ1);
  assign inv       = (state == BIST_WRITE1) || (state == BIST_READ1);
  assign ag_step   = busy;
  assign ag_init   = start_now || (busy && addr_last);
  assign cmp_clear = start_now;
  assign dg_load   = start_now;

endmodule
