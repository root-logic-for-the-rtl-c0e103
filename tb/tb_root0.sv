// tb_root0: processing-board root logic with 16 node pin sets.
// Checks upward commands on the backplane (TRUE/FALSE, KILL from STATUS_1,
// ALL/TRIG from STATUS_2, node masking), downward commands on the node lines
// (latency, 8-cycle condition, KILL), closed halfboard, open board
// forwarding, RESET_7512 from the backplane and from RCREG, and FSREG.
module tb_root0;
  import root_pkg::*;
  localparam logic [2:0] C_KILL = 3'b011, C_ALL = 3'b100, C_TRIG = 3'b101,
                         C_TRUE = 3'b110, C_FALSE = 3'b010, C_NOP = 3'b000;
  // node-side codes {IFS,IFD2,IFD1}
  localparam logic [2:0] N_KILL = 3'b011, N_TRIG = 3'b001, N_TRUE = 3'b000,
                         N_FALSE = 3'b010, N_NOP = 3'b100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_rst_n = 0, cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [63:0] cfg_wdata = 0, cfg_rdata;
  logic status1 [16], status2 [16];
  dn_sig_t node_sig [16], node_dn [2];
  logic reset_7512;
  up_code_t bp_up;
  dn_link_t bp_dn;
  always #5 clk = ~clk;

  root0 dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [63:0] v);
    cfg_addr = a; cfg_wdata = v; cfg_we = 1; @(negedge clk); cfg_we = 0;
  endtask
  task automatic nodes(input logic [2:0] v);
    for (int i = 0; i < 16; i++) node_sig[i] = v;
  endtask
  // cycles until node line h shows v (limit 40)
  task automatic wait_dn(input int h, input logic [2:0] v, output int n);
    n = 0;
    while (node_dn[h] != v && n < 40) begin @(negedge clk); n++; end
  endtask
  task automatic idle(input int n);
    nodes(N_NOP); repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, c;
    for (int i = 0; i < 16; i++) begin status1[i] = 0; status2[i] = 0; end
    nodes(N_NOP);
    bp_dn = '{rst: 1'b0, sig: N_NOP};
    repeat (2) @(negedge clk);
    rst_n = 1; cfg_rst_n = 1;
    cfg_addr = 8'h00; #1;
    chk(cfg_rdata[23:0] == 24'h00_00_05, "FSREG");
    // board closed, halfboards open
    wr(8'h02, 64'h4_0000_0000);
    nodes(N_TRUE); @(negedge clk);
    n = 1;
    while (bp_up != C_TRUE && n < 10) begin @(negedge clk); n++; end
    chk(n == 2, $sformatf("upward latency %0d != 2", n));
    wait_dn(0, N_TRUE, n);
    chk(n == 5, $sformatf("downward TRUE after %0d more cycles, expected 5", n));
    chk(node_dn[1] == N_TRUE, "both halfboards TRUE");
    c = 0;
    repeat (15) begin if (node_dn[0] == N_TRUE) c++; @(negedge clk); end
    chk(c == 8, $sformatf("TRUE to nodes for %0d cycles", c));
    idle(10);
    // one FALSE
    nodes(N_TRUE); node_sig[12] = N_FALSE;
    wait_dn(1, N_FALSE, n); chk(n < 40 && node_dn[0] == N_FALSE, "FALSE to all nodes");
    chk(bp_up == C_FALSE, "FALSE upward");
    idle(10);
    // masked node does not hold the condition back
    wr(8'h02, 64'h4_0020_0000);              // mask node 5
    nodes(N_TRUE); node_sig[5] = N_NOP;
    wait_dn(0, N_TRUE, n); chk(n < 40, "masked node ignored");
    idle(10);
    wr(8'h02, 64'h4_0000_0000);
    nodes(N_TRUE); node_sig[5] = N_NOP;
    repeat (12) @(negedge clk);
    chk(bp_up == C_NOP && node_dn[0] == N_NOP, "unmasked silent node blocks condition");
    idle(10);
    // exception on one node, node's own KILL code ignored
    node_sig[3] = N_KILL; repeat (4) @(negedge clk);
    chk(bp_up == C_NOP, "node KILL code ignored");
    node_sig[3] = N_NOP;
    status1[9] = 1;
    wait_dn(0, N_KILL, n); chk(n < 40 && bp_up == C_KILL, "STATUS_1 -> KILL");
    status1[9] = 0; idle(10);
    // I2C mode: one node -> TRIG, all -> ALL
    status2[2] = 1;
    wait_dn(1, N_TRIG, n); chk(n < 40 && bp_up == C_TRIG, "STATUS_2 on one node -> TRIG");
    for (int i = 0; i < 16; i++) status2[i] = 1;
    repeat (4) @(negedge clk);
    chk(bp_up == C_ALL, "STATUS_2 on all nodes -> ALL");
    for (int i = 0; i < 16; i++) status2[i] = 0;
    idle(10);
    // halfboard 0 closed: own global IF, masked at board level
    wr(8'h02, 64'h5_0000_0000);
    for (int i = 0; i < 8; i++) node_sig[i] = N_FALSE;
    wait_dn(0, N_FALSE, n); chk(n < 40, "closed halfboard generates");
    chk(node_dn[1] == N_NOP && bp_up == C_NOP, "closed halfboard masked at board");
    idle(10);
    // board open: backplane commands forwarded
    wr(8'h02, 64'h0);
    bp_dn = '{rst: 1'b0, sig: N_KILL};
    wait_dn(0, N_KILL, n); chk(n == 6, $sformatf("backplane KILL latency %0d != 6", n));
    bp_dn = '{rst: 1'b1, sig: N_NOP};
    repeat (3) @(negedge clk);
    chk(reset_7512, "backplane RST to RESET_7512");
    bp_dn = '{rst: 1'b0, sig: N_NOP};
    repeat (10) @(negedge clk);
    // RCREG RST and KILL requests
    cfg_addr = 8'h02; #1; chk(!cfg_rdata[37], "RST not done");
    wr(8'h02, 64'h10_0000_0000);
    c = 0;
    repeat (14) begin @(negedge clk); if (reset_7512) c++; end
    chk(c == 8, $sformatf("RESET_7512 for %0d cycles", c));
    cfg_addr = 8'h02; #1; chk(cfg_rdata[37], "RST done");
    wr(8'h02, 64'h8_0000_0000);
    wait_dn(1, N_KILL, n); chk(n < 40, "RCREG KILL request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
