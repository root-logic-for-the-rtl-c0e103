// tb_cmd_pulse: checks the 8-cycle command length, the done flag, restart
// while active and the reset.
module tb_cmd_pulse;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, active, done;
  always #5 clk = ~clk;

  cmd_pulse #(.CMD_LEN(8)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!active && !done, "idle after reset");
    start = 1; @(negedge clk); start = 0;
    n = 0;
    while (active && n < 20) begin
      chk(!done, "done low while active");
      n++; @(negedge clk);
    end
    chk(n == 8, $sformatf("length %0d != 8", n));
    chk(done, "done after command");
    repeat (5) @(negedge clk);
    chk(done && !active, "done held");
    // restart in the middle
    start = 1; @(negedge clk); start = 0;
    chk(!done, "done cleared by start");
    repeat (3) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    n = 0;
    while (active && n < 20) begin n++; @(negedge clk); end
    chk(n == 8, $sformatf("restart length %0d != 8", n));
    // reset clears
    start = 1; @(negedge clk); start = 0;
    rst_n = 0; #1;
    chk(!active && !done, "async reset");
    @(negedge clk); rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
