// tb_glock: global-condition lock.  A long TRUE must reach the nodes for
// exactly 8 cycles; a new condition after only 2 idle cycles is ignored;
// after 3 idle cycles it is accepted; KILL passes through while locked.
module tb_glock;
  import root_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, locked;
  dn_cmd_e d = D_NOP, q;
  always #5 clk = ~clk;

  glock #(.NSTAB(3), .GLOCK_LEN(8)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // count output cycles equal to v over n cycles
  task automatic drive_count(input dn_cmd_e din, input int n, input dn_cmd_e v, output int cnt);
    cnt = 0;
    d = din;
    repeat (n) begin @(negedge clk); if (q == v) cnt++; end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // TRUE held 20 cycles: 8 output cycles, first one cycle after input
    d = D_TRUE; @(negedge clk);
    chk(q == D_TRUE, "TRUE after one cycle");
    c = 1;
    repeat (19) begin @(negedge clk); if (q == D_TRUE) c++; end
    chk(c == 8, $sformatf("TRUE length %0d != 8", c));
    chk(locked, "locked while condition persists");
    // KILL passes while locked
    d = D_KILL; @(negedge clk);
    chk(q == D_KILL, "KILL passes when locked");
    drive_count(D_TRUE, 3, D_TRUE, c);
    chk(c == 0, "TRUE still ignored");
    // 2 idle cycles, then FALSE: ignored
    d = D_NOP; repeat (2) @(negedge clk);
    drive_count(D_FALSE, 6, D_FALSE, c);
    chk(c == 0, "FALSE ignored after 2 idle cycles");
    // 3 idle cycles, then FALSE: accepted for 8 cycles
    d = D_NOP; repeat (3) @(negedge clk);
    chk(!locked, "unlocked after 3 idle cycles");
    drive_count(D_FALSE, 4, D_FALSE, c);
    chk(c == 4, "FALSE accepted");
    drive_count(D_NOP, 10, D_FALSE, c);
    chk(c == 4, "FALSE length 8 even when input drops");
    // TRIG passes unlocked
    drive_count(D_TRIG, 3, D_TRIG, c);
    chk(c == 3, "TRIG passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
