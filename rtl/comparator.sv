// comparator: checks memory read data against the expected pattern.
//
// On every cycle with `valid` high it compares the (corrected) read word
// with `expected` and samples the DMC decoder's flags. It keeps a sticky
// `fail` flag and the address of the first mismatch, and counts
// mismatches (words still wrong after correction), words in which the
// code detected an error and words in which it corrected one or more
// symbols. Counters saturate. `clear` (synchronous) restarts all of it.
//
// Comparing the memory output with the golden value follows the document;
// the counters, the first-fail address and the use of the DMC flags are
// this design's own.
//
// Timing: results are registered at the rising edge of the cycle whose
// inputs they describe.
module comparator #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 5,
  parameter int unsigned CW    = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] expected,
  input  logic [WIDTH-1:0] actual,
  input  logic             err,        // DMC: non-zero syndrome
  input  logic             corrected,  // DMC: some symbol corrected
  output logic             fail,
  output logic [AW-1:0]    fail_addr,
  output logic [CW-1:0]    mismatch_cnt,
  output logic [CW-1:0]    detect_cnt,
  output logic [CW-1:0]    correct_cnt
);

  logic mismatch;
  assign mismatch = (actual != expected);

  function automatic logic [CW-1:0] sat_inc(logic [CW-1:0] c);
    return (c == '1) ? c : c + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail         <= 1'b0;
      fail_addr    <= '0;
      mismatch_cnt <= '0;
      detect_cnt   <= '0;
      correct_cnt  <= '0;
    end else if (clear) begin
      fail         <= 1'b0;
      fail_addr    <= '0;
      mismatch_cnt <= '0;
      detect_cnt   <= '0;
      correct_cnt  <= '0;
    end else if (valid) begin
      if (mismatch) begin
        if (!fail) fail_addr <= addr;
        fail         <= 1'b1;
        mismatch_cnt <= sat_inc(mismatch_cnt);
      end
      if (err)       detect_cnt  <= sat_inc(detect_cnt);
      if (corrected) correct_cnt <= sat_inc(correct_cnt);
    end
  end

endmodule
