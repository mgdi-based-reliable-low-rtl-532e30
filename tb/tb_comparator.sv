// tb_comparator: drives random compare cycles and checks the sticky fail
// flag, the first failing address and the three counters against a
// model kept in the testbench; checks `clear` and that idle cycles count
// nothing.
module tb_comparator;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, err = 0, corrected = 0;
  logic [4:0] addr = 0, fail_addr;
  logic [31:0] expected = 0, actual = 0;
  logic fail;
  logic [7:0] mismatch_cnt, detect_cnt, correct_cnt;
  int checks = 0, failures = 0;

  comparator dut (.*);

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

  initial begin
    int nm, nd, nc; logic f; logic [4:0] fa;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      clear = 1; @(posedge clk); #1; clear = 0;
      nm = 0; nd = 0; nc = 0; f = 0; fa = 0;
      check(!fail && mismatch_cnt == 0 && detect_cnt == 0 && correct_cnt == 0, "cleared");
      for (int i = 0; i < 100; i++) begin
        valid = ($urandom_range(0, 3) != 0);
        addr = 5'($urandom);
        expected = $urandom;
        actual = ($urandom_range(0, 9) == 0 && round > 0) ? expected ^ 32'(1 << $urandom_range(0, 31)) : expected;
        err = ($urandom_range(0, 4) == 0);
        corrected = err && $urandom_range(0, 1);
        if (valid) begin
          if (actual != expected) begin
            if (!f) fa = addr;
            f = 1; nm++;
          end
          nd += int'(err); nc += int'(corrected);
        end
        @(posedge clk); #1;
        check(fail == f && mismatch_cnt == 8'(nm) && detect_cnt == 8'(nd) && correct_cnt == 8'(nc),
              $sformatf("round %0d cycle %0d", round, i));
        if (f) check(fail_addr == fa, "first fail address");
      end
      valid = 0;
      check(round == 0 || nm > 0, "mismatches exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
