// tb_mbist_top: end-to-end test of the memory with its self-test, at the
// default size (32 x 32 information word array).
//
// 1. BIST with background F5AFF6AC and no fault: passes, no errors seen,
//    every address written, done after 4*32+1 clocks.
// 2. BIST with the upset pattern 0111 in symbol 2 of one word: the code
//    detects and corrects it in both read passes, the test passes.
// 3. BIST with an upset in two symbols of one matrix column: the test
//    fails and reports the address.
// 4. Functional mode: after the test every word holds the complemented
//    background; random writes and reads, and a corrected read.
// Each mechanism (clean pass, correction, uncorrectable fail, functional
// access, functional correction, mode switch) is counted and must occur.
module tb_mbist_top;
  import mbist_pkg::*;
  logic clk = 0, rst_n = 0, test_mode = 0, start = 0;
  dmc_data_t background = 0;
  bist_state_t bist_state;
  logic bist_busy, bist_done, bist_fail;
  logic [4:0] bist_fail_addr;
  logic [7:0] bist_mismatch_cnt, bist_detect_cnt, bist_correct_cnt;
  logic [4:0] func_addr = 0;
  logic func_we = 0;
  dmc_data_t func_wdata = 0, func_rdata, func_rdata_raw;
  logic func_err;
  logic [7:0] func_sym_err;
  logic flip_en = 0;
  logic [4:0] flip_addr = 0;
  dmc_data_t flip_mask = 0;
  int checks = 0, failures = 0;
  int n_clean = 0, n_corrected = 0, n_fail = 0, n_func = 0, n_func_corr = 0, n_switch = 0;

  mbist_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_bist(logic [31:0] bg, output int cycles);
    if (!test_mode) n_switch++;
    test_mode = 1;
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
    dmc_data_t model [32];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // 1: clean memory
    run_bist(32'hF5AF_F6AC, cycles);
    check(cycles == 4 * 32 + 1, $sformatf("BIST length %0d cycles", cycles));
    // every address was written: the memory powered up random, and now
    // each word holds the complemented background of the last write pass
    test_mode = 0; n_switch++;
    for (int a = 0; a < 32; a++) begin
      func_addr = 5'(a); #1;
      check(func_rdata_raw == 32'h0A50_0953, $sformatf("address %0d written", a));
    end
    check(!bist_fail && bist_mismatch_cnt == 0 && bist_detect_cnt == 0 && bist_correct_cnt == 0,
          "clean test passes");
    if (!bist_fail && bist_detect_cnt == 0) n_clean++;

    // 2: correctable upset, the example of the memory test with fault
    flip_en = 1; flip_addr = 5'd13; flip_mask = 32'h0000_0700;
    run_bist(32'hF5AF_F6AC, cycles);
    check(cycles == 4 * 32 + 1, "BIST length with fault");
    check(!bist_fail && bist_mismatch_cnt == 0, "corrected test passes");
    check(bist_detect_cnt == 2 && bist_correct_cnt == 2, $sformatf("detected %0d corrected %0d",
          bist_detect_cnt, bist_correct_cnt));
    if (!bist_fail && bist_correct_cnt != 0) n_corrected++;

    // 3: uncorrectable upset: symbols 0 and 4 (same matrix column)
    flip_addr = 5'd22; flip_mask = 32'h0003_0001;
    run_bist($urandom, cycles);
    check(bist_fail && bist_fail_addr == 5'd22, "uncorrectable upset fails");
    check(bist_mismatch_cnt == 2 && bist_detect_cnt == 2, "one bad word per read pass");
    if (bist_fail) n_fail++;

    // 4: functional mode; the last BIST pass wrote the complement
    flip_en = 0;
    test_mode = 0; n_switch++;
    for (int a = 0; a < 32; a++) begin
      func_addr = 5'(a); #1;
      check(func_rdata == ~background && !func_err, $sformatf("BIST left ~bg at %0d", a));
    end
    for (int a = 0; a < 32; a++) begin
      model[a] = $urandom;
      func_addr = 5'(a); func_wdata = model[a]; func_we = 1;
      @(posedge clk); #1; func_we = 0;
    end
    for (int i = 0; i < 64; i++) begin
      func_addr = 5'($urandom); #1;
      check(func_rdata == model[func_addr] && !func_err, "functional read");
      n_func++;
    end
    flip_en = 1; flip_addr = 5'd3; flip_mask = 32'hF000_0000; func_addr = 5'd3; #1;
    check(func_rdata == model[3] && func_err && func_sym_err == 8'h80, "functional read corrected");
    check(func_rdata_raw == (model[3] ^ 32'hF000_0000), "raw word shows the upset");
    if (func_err && func_rdata == model[3]) n_func_corr++;
    flip_en = 0;

    // back to test mode once more: clean pass over the new contents
    run_bist(32'h0000_0000, cycles);
    check(!bist_fail && bist_detect_cnt == 0, "test after functional use passes");

    check(n_clean > 0,     "mechanism: clean BIST pass");
    check(n_corrected > 0, "mechanism: corrected upset during BIST");
    check(n_fail > 0,      "mechanism: uncorrectable upset reported");
    check(n_func > 0,      "mechanism: functional access");
    check(n_func_corr > 0, "mechanism: functional correction");
    check(n_switch >= 2,   "mechanism: mode switch");
    $display("mechanisms: clean=%0d corrected=%0d fail=%0d func=%0d func_corr=%0d switch=%0d",
             n_clean, n_corrected, n_fail, n_func, n_func_corr, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
