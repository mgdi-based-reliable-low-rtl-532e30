// tb_clock_splitter: checks the two-flop ring against the 00,10,11,01
// sequence, that it holds without `ce`, that `wrap` marks every fourth
// step, and the synchronous clear.
module tb_clock_splitter;
  logic clk = 0, rst_n = 0, clr = 0, ce = 0;
  logic q1, q2, wrap;
  int checks = 0, failures = 0;

  clock_splitter dut (.*);

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

  logic [1:0] seq [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
  int idx = 0, wraps = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check({q1, q2} == 2'b00, "reset state");
    for (int i = 0; i < 200; i++) begin
      ce = ($urandom_range(0, 3) != 0);
      @(negedge clk);  // settle before sampling combinational wrap
      check(wrap == (ce && idx == 3), "wrap");
      @(posedge clk); #1;
      if (ce) begin
        idx = (idx + 1) % 4;
        if (idx == 0) wraps++;
      end
      check({q1, q2} == seq[idx], $sformatf("state step %0d", i));
    end
    check(wraps > 5, "ring wrapped");
    // clear from a non-zero state
    ce = 1; @(posedge clk); #1;
    clr = 1; @(posedge clk); #1; clr = 0; ce = 0;
    check({q1, q2} == 2'b00, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
