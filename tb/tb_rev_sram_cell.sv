// tb_rev_sram_cell: writes 0 and 1 through the word line, checks that the
// cell holds while the word line is low and the data input moves, and
// that the output is the complement of the stored bit.
module tb_rev_sram_cell;
  logic wl = 0, din = 0, bit_n;
  int checks = 0, failures = 0;

  rev_sram_cell dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic stored;
    for (int i = 0; i < 40; i++) begin
      logic d;
      d = 1'($urandom);
      din = d; #1; wl = 1; #1;
      check(bit_n == ~d, "transparent while WL high");
      wl = 0; #1;
      stored = d;
      for (int j = 0; j < 3; j++) begin
        din = 1'($urandom); #1;
        check(bit_n == ~stored, "hold while WL low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
