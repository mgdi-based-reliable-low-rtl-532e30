// tb_gdi_sram: fills the 32 x 32 array with random words, reads all back,
// overwrites a few rows and checks that only those rows changed.
module tb_gdi_sram;
  logic [4:0] addr = 0;
  logic we = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  gdi_sram dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(int a, logic [31:0] d);
    addr = 5'(a); wdata = d; #1; we = 1; #1; we = 0; #1;
    model[a] = d;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) write(a, $urandom);
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a); #1;
      check(rdata == model[a], $sformatf("read %0d", a));
    end
    for (int n = 0; n < 20; n++) write($urandom_range(0, 31), $urandom);
    for (int a = 31; a >= 0; a--) begin
      addr = 5'(a); #1;
      check(rdata == model[a], $sformatf("reread %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
