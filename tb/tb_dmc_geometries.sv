// tb_dmc_geometries: runs the DMC encoder/decoder check at the matrix
// geometries the code is described with: 2 x 4 symbols of 4 bits (the
// 32-bit default), 2 x 8 of 4 bits (64-bit word), 4 x 4 of 2 bits and
// 2 x 2 of 8 bits (32-bit words). Also checks each geometry's number of
// redundant bits, K1*(K2/2)*(M+1) + K2*M: 36, 72, 32 and 34.
module tb_dmc_geometries;
  logic start = 0;
  logic [3:0] done;
  int c [4], f [4];
  int checks, failures;

  dmc_geom_check #(.K1(2), .K2(4), .M(4)) g0 (.start, .done(done[0]), .checks(c[0]), .failures(f[0]));
  dmc_geom_check #(.K1(2), .K2(8), .M(4)) g1 (.start, .done(done[1]), .checks(c[1]), .failures(f[1]));
  dmc_geom_check #(.K1(4), .K2(4), .M(2)) g2 (.start, .done(done[2]), .checks(c[2]), .failures(f[2]));
  dmc_geom_check #(.K1(2), .K2(2), .M(8)) g3 (.start, .done(done[3]), .checks(c[3]), .failures(f[3]));

  function automatic int red_bits(int k1, int k2, int m);
    return k1 * (k2 / 2) * (m + 1) + k2 * m;
  endfunction

  initial begin : watchdog
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 start = 1;
    wait (&done);
    checks = c[0] + c[1] + c[2] + c[3] + 4;
    failures = f[0] + f[1] + f[2] + f[3];
    if ($bits(g0.h) + $bits(g0.v) != 36 || red_bits(2, 4, 4) != 36) failures++;
    if ($bits(g1.h) + $bits(g1.v) != 72 || red_bits(2, 8, 4) != 72) failures++;
    if ($bits(g2.h) + $bits(g2.v) != 32 || red_bits(4, 4, 2) != 32) failures++;
    if ($bits(g3.h) + $bits(g3.v) != 34 || red_bits(2, 2, 8) != 34) failures++;
    $display("geometry checks: %0d %0d %0d %0d", c[0], c[1], c[2], c[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
