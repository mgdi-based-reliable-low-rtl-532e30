// tb_dmc_decoder: encodes words with a reference encoder, corrupts the
// information bits and checks the decoder: no error gives no flag; the
// example upset (pattern 0111 in symbol 2 of F5AFF6AC) and random upsets
// of one symbol, or of two symbols in neighbouring columns, are corrected and
// flagged on the right symbols; errors in the check bits alone are
// detected and leave the data untouched.
module tb_dmc_decoder;
  import mbist_pkg::*;
  dmc_data_t d_rd, d_corr;
  dmc_h_t h_rd, h_re;
  dmc_v_t v_rd, v_re;
  logic [7:0] sym_err;
  logic err;
  int checks = 0, failures = 0;

  dmc_decoder dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [19:0] ref_h(logic [31:0] x);
    return {5'(x[23:20]) + 5'(x[31:28]), 5'(x[19:16]) + 5'(x[27:24]),
            5'(x[7:4])   + 5'(x[15:12]), 5'(x[3:0])   + 5'(x[11:8])};
  endfunction
  function automatic logic [15:0] ref_v(logic [31:0] x);
    return x[15:0] ^ x[31:16];
  endfunction

  // apply a stored word and a read word (possibly corrupted)
  task automatic apply(logic [31:0] good, logic [31:0] bad,
                       logic [19:0] hflip, logic [15:0] vflip);
    h_rd = ref_h(good) ^ hflip;
    v_rd = ref_v(good) ^ vflip;
    d_rd = bad;
    h_re = ref_h(bad);
    v_re = ref_v(bad);
    #1;
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, e;
    // example from the memory test with fault
    w = 32'hF5AF_F6AC;
    apply(w, w ^ 32'h0000_0700, '0, '0);
    check(d_corr == w, "example corrected");
    check(sym_err == 8'b0000_0100 && err, "example located in symbol 2");
    apply(w, w, '0, '0);
    check(d_corr == w && !err && sym_err == '0, "example clean");
    for (int i = 0; i < 200; i++) begin
      int s, s2;
      w = $urandom;
      // one symbol
      s = $urandom_range(0, 7);
      e = 32'($urandom_range(1, 15)) << (4 * s);
      apply(w, w ^ e, '0, '0);
      check(d_corr == w, $sformatf("single symbol %0d", s));
      check(err && sym_err == (8'd1 << s), "single symbol flags");
      // two symbols in neighbouring matrix columns
      s2 = (s + 1 + 4 * $urandom_range(0, 1)) % 8;
      e = e | (32'($urandom_range(1, 15)) << (4 * s2));
      apply(w, w ^ e, '0, '0);
      check(d_corr == w, $sformatf("symbols %0d and %0d", s, s2));
      // check-bit errors only
      apply(w, w, 20'(1) << $urandom_range(0, 19), '0);
      check(err && d_corr == w, "H bit error detected, data kept");
      apply(w, w, '0, 16'(1) << $urandom_range(0, 15));
      check(err && d_corr == w, "V bit error detected, data kept");
      apply(w, w, '0, '0);
      check(!err && d_corr == w, "clean");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
