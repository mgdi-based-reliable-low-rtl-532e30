// tb_mbist_top_wide: the whole design with the 2 x 8 symbol code (64-bit
// words, 72 check bits per word) and 32 rows. Runs a clean self-test, a
// test with a 4-bit upset in symbol 9 of one word (corrected, so the test
// passes with one detection and one correction per read pass), and a test
// with an upset in symbols 0 and 8 (same matrix column, so the test fails
// at that address). Checks the 4 * 32 + 1 clock test length.
module tb_mbist_top_wide;
  import mbist_pkg::*;
  localparam int unsigned DW = 64;
  logic clk = 0, rst_n = 0, test_mode = 1, start = 0;
  logic [DW-1:0] background = 0;
  bist_state_t bist_state;
  logic bist_busy, bist_done, bist_fail;
  logic [4:0] bist_fail_addr;
  logic [7:0] bist_mismatch_cnt, bist_detect_cnt, bist_correct_cnt;
  logic [4:0] func_addr = 0;
  logic func_we = 0;
  logic [DW-1:0] func_wdata = 0, func_rdata, func_rdata_raw;
  logic func_err;
  logic [15:0] func_sym_err;
  logic flip_en = 0;
  logic [4:0] flip_addr = 0;
  logic [DW-1:0] flip_mask = 0;
  int checks = 0, failures = 0;

  mbist_top #(.K2(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_bist(logic [DW-1:0] bg, output int cycles);
    background = bg; start = 1;
    @(posedge clk); #1; start = 0;
    cycles = 1;
    while (!bist_done && cycles < 1000) begin
      @(posedge clk); #1;
      cycles++;
    end
  endtask

  initial begin
    int cycles;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run_bist(64'hF5AF_F6AC_0123_4567, cycles);
    check(cycles == 4 * 32 + 1, $sformatf("test length %0d", cycles));
    check(!bist_fail && bist_detect_cnt == 0, "clean test passes");
    flip_en = 1; flip_addr = 5'd17; flip_mask = 64'h0000_00F0_0000_0000;
    run_bist(64'hDEAD_BEEF_F5AF_F6AC, cycles);
    check(!bist_fail && bist_detect_cnt == 2 && bist_correct_cnt == 2, "symbol 9 upset corrected");
    flip_addr = 5'd30; flip_mask = 64'h0000_0001_0000_0001;
    run_bist(64'h0F0F_0F0F_0F0F_0F0F, cycles);
    check(bist_fail && bist_fail_addr == 5'd30 && bist_mismatch_cnt == 2, "same-column upset fails");
    flip_en = 0;
    test_mode = 0;
    func_addr = 5'd4; #1;
    check(func_rdata == ~64'h0F0F_0F0F_0F0F_0F0F && !func_err, "memory holds last background");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
