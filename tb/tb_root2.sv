// tb_root2: top level with 16 crate inputs.  Checks masking of unconnected
// connectors, the all-TRUE / any-FALSE condition, KILL, the internal bus
// replacing C0, register KILL and RST on all connectors, and FSREG.
module tb_root2;
  import root_pkg::*;
  localparam logic [2:0] C_KILL = 3'b011, C_ALL = 3'b100, C_TRIG = 3'b101,
                         C_TRUE = 3'b110, C_FALSE = 3'b010, C_NOP = 3'b000;
  localparam logic [2:0] N_KILL = 3'b011, N_TRIG = 3'b001, N_TRUE = 3'b000,
                         N_FALSE = 3'b010, N_NOP = 3'b100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_rst_n = 0, cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [63:0] cfg_wdata = 0, cfg_rdata;
  logic sw_internal = 0;
  up_code_t bank_up [16];
  dn_link_t bank_dn [16];
  up_code_t int_up = 3'b000, hi_up;
  dn_link_t int_dn, hi_dn;
  always #5 clk = ~clk;

  root2 dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [63:0] v);
    cfg_addr = a; cfg_wdata = v; cfg_we = 1; @(negedge clk); cfg_we = 0;
  endtask
  function automatic logic all_dn(input logic [2:0] v);
    for (int i = 0; i < 16; i++) if (bank_dn[i].sig != v) return 1'b0;
    return int_dn.sig == v;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    for (int i = 0; i < 16; i++) bank_up[i] = C_NOP;
    hi_dn = DN_LINK_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1; cfg_rst_n = 1;
    cfg_addr = 8'h00; #1;
    chk(cfg_rdata[23:0] == 24'h02_03_00, "FSREG");
    // closed, 4 crates connected
    wr(8'h40, 64'h1_FFF0);
    for (int i = 0; i < 4; i++) bank_up[i] = C_TRUE;
    @(negedge clk);
    chk(all_dn(N_TRUE) && hi_up == C_TRUE, "TRUE after one cycle");
    bank_up[3] = C_FALSE; @(negedge clk);
    chk(all_dn(N_FALSE), "FALSE");
    bank_up[9] = C_KILL; @(negedge clk);
    chk(all_dn(N_FALSE), "masked connector ignored");
    bank_up[2] = C_KILL; @(negedge clk);
    chk(all_dn(N_KILL), "KILL");
    // internal bus replaces C0
    for (int i = 0; i < 16; i++) bank_up[i] = C_TRUE;
    bank_up[0] = C_FALSE; int_up = C_TRUE; @(negedge clk);
    chk(all_dn(N_FALSE), "C0 used without internal bus");
    sw_internal = 1; @(negedge clk);
    chk(all_dn(N_TRUE), "internal bus replaces C0");
    for (int i = 0; i < 16; i++) bank_up[i] = C_NOP;
    int_up = C_NOP;
    // register KILL and RST
    wr(8'h41, 64'h1);
    chk(all_dn(N_NOP), "TCREG KILL one cycle after the write");
    @(negedge clk);
    chk(all_dn(N_KILL), "TCREG KILL");
    c = 0; repeat (12) begin if (bank_dn[5].sig == N_KILL) c++; @(negedge clk); end
    chk(c == 8, $sformatf("KILL for %0d cycles", c));
    wr(8'h41, 64'h4); @(negedge clk);
    chk(bank_dn[15].rst && int_dn.rst, "TCREG RST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
