// tb_bist_controller: runs the controller against a counting address
// model of 32 addresses and checks the pass order, the write and compare
// strobes per pass (32 each), the pattern polarity, the restarts of the
// address sequence, `done` after 4 * 32 + 1 clocks, and a second start.
module tb_bist_controller;
  import mbist_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, addr_last;
  bist_state_t state;
  logic busy, done, ag_init, ag_step, mem_we, cmp_valid, cmp_clear, dg_load, inv;
  int checks = 0, failures = 0;
  logic [4:0] cnt;

  bist_controller dut (.*);

  always #5 clk = ~clk;

  // address model: a counter that restarts on init
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       cnt <= 0;
    else if (ag_init) cnt <= 0;
    else if (ag_step) cnt <= cnt + 1;
  assign addr_last = (cnt == 31);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(state == BIST_IDLE && !busy && !done, "idle after reset");
    for (int run = 0; run < 2; run++) begin
      int cycles, wr0, rd0, wr1, rd1;
      cycles = 0; wr0 = 0; rd0 = 0; wr1 = 0; rd1 = 0;
      start = 1; #1;
      check(cmp_clear && dg_load && ag_init, "start strobes");
      @(posedge clk); #1; start = 0;
      cycles = 1;
      while (!done && cycles < 500) begin
        if (mem_we && !inv) wr0++;
        if (cmp_valid && !inv) rd0++;
        if (mem_we && inv) wr1++;
        if (cmp_valid && inv) rd1++;
        check(!(mem_we && cmp_valid), "write and compare exclusive");
        if (state == BIST_WRITE0) check(rd0 == 0 && wr1 == 0, "order W0");
        if (state == BIST_READ0)  check(wr0 == 32 && wr1 == 0, "order R0");
        if (state == BIST_WRITE1) check(rd0 == 32 && rd1 == 0, "order W1");
        if (state == BIST_READ1)  check(wr1 == 32, "order R1");
        check(ag_step == busy, "address steps every busy cycle");
        @(posedge clk); #1;
        cycles++;
      end
      check(wr0 == 32 && rd0 == 32 && wr1 == 32 && rd1 == 32,
            $sformatf("pass lengths %0d %0d %0d %0d", wr0, rd0, wr1, rd1));
      check(cycles == 4 * 32 + 1, $sformatf("test length %0d cycles", cycles));
      check(done && !busy && state == BIST_DONE, "done");
      repeat (3) @(posedge clk); #1;
      check(done, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
