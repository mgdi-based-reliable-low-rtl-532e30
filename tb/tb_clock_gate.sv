// tb_clock_gate: drives a clock and a random enable that changes at
// random points of both clock phases; checks that each gated pulse appears
// exactly when the enable was high at the rising clock edge, that the
// gated clock is never high while the clock is low, and that enable
// changes in the high phase do not cut a pulse.
module tb_clock_gate;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int exp_pulses = 0, got_pulses = 0;

  clock_gate dut (.*);

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

  always @(posedge gclk) got_pulses++;

  initial begin
    logic en_at_edge;
    for (int i = 0; i < 300; i++) begin
      // low phase: enable may change anywhere
      #($urandom_range(1, 4)) en = 1'($urandom);
      #1 check(gclk == 0, "gclk low while clk low");
      #3;
      en_at_edge = en;
      clk = 1;
      #1 check(gclk == en_at_edge, $sformatf("pulse %0d follows enable", i));
      // high phase: enable change must not affect the pulse
      #($urandom_range(1, 2)) en = 1'($urandom);
      #1 check(gclk == en_at_edge, "pulse not cut or created in high phase");
      if (en_at_edge) exp_pulses++;
      #1 clk = 0;
      #1 check(gclk == 0, "gclk falls with clk");
    end
    check(got_pulses == exp_pulses && exp_pulses > 50, $sformatf("pulses %0d expected %0d", got_pulses, exp_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
