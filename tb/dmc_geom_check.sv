// dmc_geom_check: test helper that exercises the DMC encoder and decoder at
// one matrix geometry (K1 x K2 symbols of M bits). On `start` it encodes
// random words and compares the check bits with a reference computed here
// bit by bit, then corrupts one symbol, or two symbols of one matrix row
// that lie in different horizontal fields, and checks that the decoder restores the word and flags the
// right symbols. It reports its counts and raises `done`.
module dmc_geom_check #(
  parameter int unsigned K1 = 2,
  parameter int unsigned K2 = 4,
  parameter int unsigned M  = 4,
  parameter int unsigned N_WORDS = 200
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned K  = K1 * K2;
  localparam int unsigned DW = K * M;
  localparam int unsigned HW = K1 * (K2 / 2) * (M + 1);
  localparam int unsigned VW = K2 * M;

  logic [DW-1:0] d, d_rd, d_corr, u;
  logic [HW-1:0] h, h_rd;
  logic [VW-1:0] v, v_rd;
  logic [K-1:0]  sym_err;
  logic err;

  dmc_encoder #(.K1(K1), .K2(K2), .M(M)) enc_w (.d(d),    .h(h),    .v(v),    .u(u));
  dmc_encoder #(.K1(K1), .K2(K2), .M(M)) enc_r (.d(d_rd), .h(h_rd), .v(v_rd), .u());
  dmc_decoder #(.K1(K1), .K2(K2), .M(M)) dec (
    .d_rd(d_rd), .h_rd(h), .v_rd(v), .h_re(h_rd), .v_re(v_rd),
    .d_corr(d_corr), .sym_err(sym_err), .err(err));

  function automatic logic [DW-1:0] rand_word();
    logic [DW-1:0] w;
    for (int i = 0; i < DW; i += 32) w = (w << 32) | DW'($urandom);
    return w;
  endfunction

  function automatic logic [M-1:0] sym(logic [DW-1:0] w, int r, int c);
    return w[(r * K2 + c) * M +: M];
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%0dx%0d, m=%0d): %s", K1, K2, M, what);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    d = '0; d_rd = '0;
    wait (start);
    for (int n = 0; n < N_WORDS; n++) begin
      logic [HW-1:0] h_ref;
      logic [VW-1:0] v_ref;
      logic [DW-1:0] e;
      int s1, s2;
      d = rand_word();
      d_rd = d;
      #1;
      // reference: row sums of columns c and c + K2/2, column XORs
      h_ref = '0;
      for (int r = 0; r < int'(K1); r++)
        for (int c = 0; c < int'(K2 / 2); c++)
          h_ref[(r * (K2 / 2) + c) * (M + 1) +: M + 1] =
            (M + 1)'(sym(d, r, c)) + (M + 1)'(sym(d, r, c + K2 / 2));
      v_ref = '0;
      for (int i = 0; i < int'(VW); i++)
        for (int r = 0; r < int'(K1); r++)
          v_ref[i] ^= d[r * VW + i];
      check(h == h_ref, "horizontal bits");
      check(v == v_ref, "vertical bits");
      check(u == d, "data bits");
      check(!err && d_corr == d, "clean word");
      // one symbol
      s1 = $urandom_range(0, K - 1);
      e = '0;
      e[s1 * M +: M] = M'($urandom_range(1, (1 << M) - 1));
      d_rd = d ^ e;
      #1;
      check(d_corr == d && err && sym_err == (K'(1) << s1), $sformatf("symbol %0d", s1));
      // a second symbol of the same matrix row in another horizontal
      // field (a burst along the row); needs at least two fields per row
      if (K2 >= 4) begin
        s2 = (s1 / K2) * K2 + (s1 % K2 + 1) % (K2 / 2) + ((s1 % K2) / (K2 / 2)) * (K2 / 2);
        e[s2 * M +: M] = M'($urandom_range(1, (1 << M) - 1));
        d_rd = d ^ e;
        #1;
        check(d_corr == d && err && sym_err == ((K'(1) << s1) | (K'(1) << s2)),
              $sformatf("symbols %0d and %0d", s1, s2));
      end
    end
    done = 1;
  end
endmodule
