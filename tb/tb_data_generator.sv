// tb_data_generator: loads backgrounds and checks the true and
// complemented pattern, and that the background holds without `load`.
module tb_data_generator;
  logic clk = 0, rst_n = 0, load = 0, inv = 0;
  logic [31:0] bg_in = 0, pattern;
  int checks = 0, failures = 0;

  data_generator dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] bg;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check(pattern == 0, "reset background");
    for (int i = 0; i < 20; i++) begin
      bg = (i == 0) ? 32'hF5AF_F6AC : $urandom;
      bg_in = bg; load = 1; @(posedge clk); #1; load = 0;
      bg_in = $urandom;
      inv = 0; #1 check(pattern == bg, "true pattern");
      inv = 1; #1 check(pattern == ~bg, "complement pattern");
      @(posedge clk); #1;
      check(pattern == ~bg, "holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
