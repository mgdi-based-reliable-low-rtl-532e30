// tb_ft_memory: writes all 32 words through the encoder, reads them back
// clean, then injects upsets on the read path: the example upset (0111 in
// symbol 2 of F5AFF6AC) and random single-symbol upsets must come out
// corrected and flagged; an upset of two symbols in the same matrix column
// (symbols 0 and 4) is beyond the code and must leave a wrong word with
// the error flag set.
module tb_ft_memory;
  import mbist_pkg::*;
  logic [4:0] addr = 0;
  logic we = 0;
  dmc_data_t wdata = 0, flip_mask = 0, rdata, rdata_raw;
  logic [7:0] sym_err;
  logic err;
  dmc_data_t model [32];
  int checks = 0, failures = 0;

  ft_memory dut (.*);

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
    for (int a = 0; a < 32; a++) write(a, (a == 5) ? 32'hF5AF_F6AC : $urandom);
    for (int a = 0; a < 32; a++) begin
      addr = 5'(a); #1;
      check(rdata == model[a] && !err && sym_err == 0, $sformatf("clean read %0d", a));
    end
    addr = 5; flip_mask = 32'h0000_0700; #1;
    check(rdata_raw == 32'hF5AF_F1AC, "example raw word corrupted");
    check(rdata == 32'hF5AF_F6AC, "example corrected");
    check(err && sym_err == 8'b0000_0100, "example flags");
    for (int i = 0; i < 100; i++) begin
      int s;
      s = $urandom_range(0, 7);
      addr = 5'($urandom_range(0, 31));
      flip_mask = 32'($urandom_range(1, 15)) << (4 * s);
      #1;
      check(rdata == model[addr] && err && sym_err == (8'd1 << s), "random symbol upset corrected");
    end
    addr = 9; flip_mask = 32'h0001_0001; #1;
    check(err && rdata != model[9], "same-column double upset not correctable");
    flip_mask = 0; #1;
    check(rdata == model[9] && !err, "clean again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
