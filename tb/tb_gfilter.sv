// tb_gfilter: random downward commands held for 1..6 cycles; the output is
// compared every cycle with a model that keeps the last 3 samples and
// passes a value only when all 3 are equal.  Also checks that a 2-cycle
// glitch is never passed and the 3-cycle latency of a clean command.
module tb_gfilter;
  import root_pkg::*;
  localparam int NSTAB = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  dn_cmd_e d = D_NOP, q;
  always #5 clk = ~clk;

  gfilter #(.NSTAB(NSTAB)) dut (.*);

  dn_cmd_e hist [NSTAB];
  dn_cmd_e qref = D_NOP;

  always @(posedge clk) if (rst_n) begin
    logic same;
    for (int i = NSTAB-1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = d;
    same = 1'b1;
    for (int i = 1; i < NSTAB; i++) same &= (hist[i] == hist[0]);
    if (same) qref = hist[0];
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (q !== qref) begin
      failures++;
      if (failures < 10) $display("mismatch at %0t: q=%s ref=%s", $time, q.name(), qref.name());
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dn_cmd_e dl [5] = '{D_NOP, D_FALSE, D_TRUE, D_TRIG, D_KILL};
    int lat;
    for (int i = 0; i < NSTAB; i++) hist[i] = D_NOP;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clean command: latency NSTAB samples
    @(negedge clk); d = D_KILL; lat = 0;
    while (q != D_KILL && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != NSTAB) begin failures++; $display("latency %0d", lat); end
    d = D_NOP; repeat (5) @(negedge clk);
    // 2-cycle glitch never passes
    d = D_TRIG; repeat (2) @(negedge clk); d = D_NOP;
    repeat (5) begin
      @(negedge clk); checks++;
      if (q == D_TRIG) begin failures++; $display("glitch passed"); end
    end
    // random
    repeat (600) begin
      d = dl[$urandom % 5];
      repeat (1 + $urandom % 6) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
