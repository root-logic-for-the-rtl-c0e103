// tb_root1: unit and crate levels.  Checks the crate-level reduction and the
// path to ROOT2 over the internal bus or J10 (with the J10 pair negation),
// closed crate generation with latency, open crate forwarding from the
// selected link, unit masking, a closed unit with register TRIG, RST from
// CCREG, and FSREG with the RB address.
module tb_root1;
  import root_pkg::*;
  localparam logic [2:0] C_KILL = 3'b011, C_ALL = 3'b100, C_TRIG = 3'b101,
                         C_TRUE = 3'b110, C_FALSE = 3'b010, C_NOP = 3'b000;
  localparam logic [2:0] N_KILL = 3'b011, N_TRIG = 3'b001, N_TRUE = 3'b000,
                         N_FALSE = 3'b010, N_NOP = 3'b100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_rst_n = 0, cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [63:0] cfg_wdata = 0, cfg_rdata;
  logic [3:0] rt_add = 4'hA;
  logic sw_internal = 1, sw_fixj10 = 0;
  up_code_t bp_up [16];
  dn_link_t bp_dn [16];
  up_code_t int_up, j10_up;
  dn_link_t int_dn, j10_dn;
  always #5 clk = ~clk;

  root1 dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [63:0] v);
    cfg_addr = a; cfg_wdata = v; cfg_we = 1; @(negedge clk); cfg_we = 0;
  endtask
  task automatic boards(input logic [2:0] v);
    for (int i = 0; i < 16; i++) bp_up[i] = v;
  endtask
  function automatic logic all_dn(input logic [2:0] v, input int lo, input int hi);
    for (int i = lo; i <= hi; i++) if (bp_dn[i].sig != v) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, c;
    boards(C_NOP);
    int_dn = '{rst: 1'b0, sig: N_NOP};
    j10_dn = '{rst: 1'b0, sig: N_NOP};
    repeat (2) @(negedge clk);
    rst_n = 1; cfg_rst_n = 1;
    cfg_addr = 8'h00; #1;
    chk(cfg_rdata[35:0] == 36'hA_0001_0300, "FSREG type/version/revision and RT_ADD");
    // crate closed, units open
    wr(8'h30, 64'h1_0000);
    boards(C_TRUE);
    @(negedge clk); @(negedge clk);
    chk(int_up == C_TRUE && j10_up == C_NOP, "upward on internal bus after 2 cycles");
    @(negedge clk);
    chk(all_dn(N_TRUE, 0, 15), "closed crate: TRUE to all boards after 3 cycles");
    bp_up[7] = C_FALSE; repeat (3) @(negedge clk);
    chk(all_dn(N_FALSE, 0, 15) && int_up == C_FALSE, "FALSE");
    // J10 path and negation
    sw_internal = 0; #1;
    chk(j10_up == C_FALSE && int_up == C_NOP, "upward on J10");
    sw_fixj10 = 1; #1;
    chk(j10_up == (C_FALSE ^ 3'b001), "J10 pair negated");
    sw_fixj10 = 0;
    // unit masking at the crate: unit 1 silent, masked
    boards(C_TRUE); for (int i = 4; i < 8; i++) bp_up[i] = C_NOP;
    repeat (3) @(negedge clk);
    chk(all_dn(N_NOP, 0, 15), "silent unit blocks condition");
    wr(8'h30, 64'h1_0002);
    repeat (3) @(negedge clk);
    chk(all_dn(N_TRUE, 0, 15), "masked unit ignored");
    // crate open: forwards from selected link
    wr(8'h30, 64'h0);
    boards(C_NOP);
    j10_dn = '{rst: 1'b0, sig: N_KILL}; int_dn = '{rst: 1'b0, sig: N_TRIG};
    repeat (2) @(negedge clk);
    chk(all_dn(N_KILL, 0, 15), "open crate forwards J10 command");
    sw_internal = 1; repeat (2) @(negedge clk);
    chk(all_dn(N_TRIG, 0, 15), "open crate forwards internal-bus command");
    int_dn = '{rst: 1'b0, sig: N_NOP}; j10_dn = '{rst: 1'b0, sig: N_NOP};
    repeat (2) @(negedge clk);
    // unit 2 closed with TRIG from register
    wr(8'h12, 64'h3_0000);
    wr(8'h22, 64'h2);
    @(negedge clk);
    chk(all_dn(N_TRIG, 8, 11) && all_dn(N_NOP, 0, 7), "unit 2 register TRIG");
    c = 0;
    repeat (12) begin if (bp_dn[9].sig == N_TRIG) c++; @(negedge clk); end
    chk(c == 8, $sformatf("TRIG length %0d", c));
    // RST from CCREG (crate closed) reaches all boards, RDONE
    wr(8'h30, 64'h1_0000);
    wr(8'h31, 64'h4);
    repeat (2) @(negedge clk);
    chk(bp_dn[0].rst && bp_dn[15].rst, "crate RST to all boards");
    repeat (10) @(negedge clk);
    cfg_addr = 8'h31; #1;
    chk(cfg_rdata[3] && !bp_dn[0].rst, "RDONE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
