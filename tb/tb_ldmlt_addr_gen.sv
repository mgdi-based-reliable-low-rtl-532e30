// tb_ldmlt_addr_gen: checks the 5-bit address sequence against a model
// built from its two parts (ring 00,10,11,01 on bits 4:3 every step, the
// 3-bit LFSR list on bits 2:0 every fourth step), that all 32 addresses
// appear once per 32 steps, that `last` marks step 31, that the lower
// bits change at most once per four steps, and `init`.
module tb_ldmlt_addr_gen;
  logic clk = 0, rst_n = 0, init = 0, step = 0;
  logic [4:0] addr;
  logic last;
  int checks = 0, failures = 0;

  ldmlt_addr_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] ring [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
  logic [2:0] lfsr [8] = '{3'b001, 3'b000, 3'b100, 3'b110,
                           3'b111, 3'b011, 3'b101, 3'b010};
  bit seen [32];
  int lsb_changes;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      init = 1; @(posedge clk); #1; init = 0;
      foreach (seen[i]) seen[i] = 0;
      lsb_changes = 0;
      for (int k = 0; k < 32; k++) begin
        logic [4:0] e, prev;
        e = {ring[k % 4], lfsr[k / 4]};
        check(addr == e, $sformatf("pass %0d step %0d addr %b exp %b", pass, k, addr, e));
        check(!seen[addr], "address repeated");
        seen[addr] = 1;
        check(last == (k == 31), "last");
        prev = addr;
        step = 1; @(posedge clk); #1; step = 0;
        if (addr[2:0] != prev[2:0]) lsb_changes++;
        if (pass == 1 && k % 3 == 0) begin  // stall: must hold
          logic [4:0] h;
          h = addr;
          @(posedge clk); #1;
          check(addr == h, "hold");
        end
      end
      check(lsb_changes <= 8, "lower part clocked once per four steps");
      check(addr == 5'b00001, "sequence wraps to first address");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
