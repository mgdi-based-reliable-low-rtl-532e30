// tb_dmc_encoder: checks the encoder against explicit formulas for the
// 32-bit DMC (row sums of symbols 0+2, 1+3, 4+6, 5+7; V[i] = D[i]^D[i+16])
// on random words and on the worked example F5AFF6AC, whose check bits
// were computed by hand: sums 18, 25, 20, 25 and V = 0303.
module tb_dmc_encoder;
  import mbist_pkg::*;
  dmc_data_t d, u;
  dmc_h_t h;
  dmc_v_t v;
  int checks = 0, failures = 0;

  dmc_encoder dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [19:0] ref_h(logic [31:0] x);
    logic [4:0] h0, h1, h2, h3;
    h0 = 5'(x[3:0])   + 5'(x[11:8]);
    h1 = 5'(x[7:4])   + 5'(x[15:12]);
    h2 = 5'(x[19:16]) + 5'(x[27:24]);
    h3 = 5'(x[23:20]) + 5'(x[31:28]);
    return {h3, h2, h1, h0};
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 32'hF5AF_F6AC; #1;
    check(h == {5'd25, 5'd20, 5'd25, 5'd18}, $sformatf("example H %h", h));
    check(v == 16'h0303, "example V");
    check(u == d, "example U");
    d = '1; #1;
    check(h == {4{5'd30}} && v == '0, "all ones");
    for (int i = 0; i < 300; i++) begin
      d = $urandom; #1;
      check(h == ref_h(d), "random H");
      check(v == (d[15:0] ^ d[31:16]), "random V");
      check(u == d, "random U");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
