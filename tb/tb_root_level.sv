// tb_root_level: one level with 4 children: upward reduction with one cycle
// latency (also when closed), closed generation of downward commands from
// the reduction, masking, open forwarding, TRIG select and RST.
module tb_root_level;
  import root_pkg::*;
  localparam logic [2:0] C_KILL = 3'b011, C_ALL = 3'b100, C_TRIG = 3'b101,
                         C_TRUE = 3'b110, C_FALSE = 3'b010, C_NOP = 3'b000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  up_code_t up_in [4];
  logic [3:0] mask = 0;
  logic closed = 0, tsel = 0, kill_cmd = 0, trig_cmd = 0, rst_cmd = 0, rst_in = 0, rst_out;
  dn_cmd_e dn_in = D_NOP, dn_out;
  up_code_t up_out;
  up_cmd_e red_cmd;
  always #5 clk = ~clk;

  root_level #(.NCHILD(4)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask
  task automatic set_all(input logic [2:0] v);
    for (int i = 0; i < 4; i++) up_in[i] = v;
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_all(C_NOP);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // closed: all TRUE -> TRUE down and up, one cycle later
    closed = 1; set_all(C_TRUE);
    #1; chk(up_out == C_NOP, "registered output");
    @(negedge clk);
    chk(up_out == C_TRUE && dn_out == D_TRUE, "TRUE up and down");
    // one child not yet sending its condition -> wait (NOP)
    up_in[2] = C_NOP; @(negedge clk);
    chk(up_out == C_NOP && dn_out == D_NOP, "waits for all conditions");
    // mask that child
    mask = 4'b0100; @(negedge clk);
    chk(up_out == C_TRUE && dn_out == D_TRUE, "masked child ignored");
    up_in[1] = C_FALSE; @(negedge clk);
    chk(up_out == C_FALSE && dn_out == D_FALSE, "FALSE if any FALSE");
    // masked child's KILL ignored, unmasked KILL wins
    up_in[2] = C_KILL; @(negedge clk);
    chk(up_out == C_FALSE, "masked KILL ignored");
    up_in[0] = C_KILL; @(negedge clk);
    chk(up_out == C_KILL && dn_out == D_KILL, "KILL any");
    // closed ignores incoming downward
    set_all(C_NOP); dn_in = D_KILL; rst_in = 1; @(negedge clk);
    chk(dn_out == D_NOP && !rst_out, "closed ignores incoming");
    // TRIG from upward (tsel=0) and from register (tsel=1)
    up_in[3] = C_ALL; @(negedge clk);
    chk(up_out == C_TRIG && dn_out == D_TRIG, "partial ALL gives TRIG");
    tsel = 1; @(negedge clk);
    chk(dn_out == D_NOP, "upward TRIG ignored with tsel");
    trig_cmd = 1; @(negedge clk); trig_cmd = 0;
    chk(dn_out == D_TRIG, "register TRIG with tsel");
    tsel = 0;
    // ALL on every unmasked child
    mask = 4'b0000; set_all(C_ALL); @(negedge clk);
    chk(up_out == C_ALL && dn_out == D_NOP, "ALL up, nothing down");
    // open: forward incoming, still reduce upward
    closed = 0; dn_in = D_TRUE; rst_in = 0; @(negedge clk);
    chk(dn_out == D_TRUE && up_out == C_ALL, "open forwards");
    rst_in = 1; @(negedge clk);
    chk(rst_out, "open forwards RST");
    rst_in = 0; rst_cmd = 1; closed = 1; @(negedge clk); rst_cmd = 0;
    chk(rst_out, "register RST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
