// tb_mlt_lfsr: checks the 3-bit register against the hand-derived state
// list of 1+x+x^3 with the zero state spliced in, the `last` flag, hold
// without `en` and `load`; and that a 4-bit instance walks 16 distinct
// states and returns to its seed.
module tb_mlt_lfsr;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [2:0] q;
  logic last;
  logic [3:0] q4;
  logic last4;
  int checks = 0, failures = 0;

  mlt_lfsr dut (.clk, .rst_n, .load, .en, .q, .last);
  mlt_lfsr #(.W(4), .SEED(4'b1001)) dut4 (.clk, .rst_n, .load, .en, .q(q4), .last(last4));

  always #5 clk = ~clk;

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

  // R2 R1 R0, shifting toward R0, top stage = R2^R0^(R2R1==00)
  logic [2:0] exp3 [8] = '{3'b001, 3'b000, 3'b100, 3'b110,
                           3'b111, 3'b011, 3'b101, 3'b010};
  bit seen4 [16];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < 24; i++) begin
      check(q == exp3[i % 8], $sformatf("W=3 state %0d: %b", i, q));
      check(last == (i % 8 == 7), "W=3 last");
      if (i < 16) begin
        check(!seen4[q4], "W=4 state repeated early");
        seen4[q4] = 1;
        check(last4 == (i == 15), "W=4 last");
      end
      en = 1; @(posedge clk); #1; en = 0;
      if (i % 5 == 0) begin  // idle cycle: must hold
        logic [2:0] h;
        h = q;
        @(posedge clk); #1;
        check(q == h, "hold");
      end
    end
    en = 1; @(posedge clk); @(posedge clk); #1; en = 0;
    load = 1; @(posedge clk); #1; load = 0;
    check(q == 3'b001 && q4 == 4'b1001, "load seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
