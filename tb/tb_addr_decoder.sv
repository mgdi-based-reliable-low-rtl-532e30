// tb_addr_decoder: exhaustive check of the 5-to-32 decoder, enabled and
// disabled.
module tb_addr_decoder;
  logic [4:0] addr;
  logic en;
  logic [31:0] row;
  int checks = 0, failures = 0;

  addr_decoder dut (.*);

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
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 32; a++) begin
        addr = 5'(a); en = e[0];
        #1;
        check(row == (e ? (32'd1 << a) : 32'd0), $sformatf("addr %0d en %0d", a, e));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
