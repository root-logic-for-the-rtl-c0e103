// tb_root_board: ROOT1 and ROOT2 of one root board.  ROOT2 closed (the top),
// ROOT1 open: a condition from all 16 boards goes up through unit, crate and
// top and back down to the boards, first over the internal bus, then over a
// cable from J10 to connector C0 modelled here.  Also checks the cfg select
// between the two FPGAs and the clock-select switch output.
module tb_root_board;
  import root_pkg::*;
  localparam logic [2:0] C_TRUE = 3'b110, C_FALSE = 3'b010, C_NOP = 3'b000;
  localparam logic [2:0] N_TRUE = 3'b000, N_FALSE = 3'b010, N_NOP = 3'b100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_rst_n = 0, cfg_we = 0, cfg_fpga = 0;
  logic [7:0] cfg_addr = 0;
  logic [63:0] cfg_wdata = 0, cfg_rdata;
  logic [3:0] rt_add = 4'h3;
  logic sw_int_clk_en = 1, sw_internal = 1, sw_fixj10 = 0, int_clk_en;
  up_code_t bp_up [16];
  dn_link_t bp_dn [16];
  up_code_t j10_up, hi_up;
  dn_link_t j10_dn, hi_dn;
  up_code_t bank_up [16];
  dn_link_t bank_dn [16];
  always #5 clk = ~clk;

  root_board dut (.*);

  // cable from J10 to C0
  always_comb begin
    for (int i = 1; i < 16; i++) bank_up[i] = C_NOP;
    bank_up[0] = j10_up;
    j10_dn = bank_dn[0];
    hi_dn = DN_LINK_IDLE;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask
  task automatic wr(input logic f, input logic [7:0] a, input logic [63:0] v);
    cfg_fpga = f; cfg_addr = a; cfg_wdata = v; cfg_we = 1; @(negedge clk); cfg_we = 0;
  endtask
  function automatic logic all_dn(input logic [2:0] v);
    for (int i = 0; i < 16; i++) if (bp_dn[i].sig != v) return 1'b0;
    return 1'b1;
  endfunction
  task automatic round_trip(input logic [2:0] up, input logic [2:0] exp, input string msg);
    int n;
    for (int i = 0; i < 16; i++) bp_up[i] = C_TRUE;
    bp_up[11] = up;
    n = 0;
    while (!all_dn(exp) && n < 20) begin @(negedge clk); n++; end
    chk(n == 5, $sformatf("%s: round trip %0d cycles, expected 5", msg, n));
    for (int i = 0; i < 16; i++) bp_up[i] = C_NOP;
    repeat (6) @(negedge clk);
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) bp_up[i] = C_NOP;
    repeat (2) @(negedge clk);
    rst_n = 1; cfg_rst_n = 1;
    chk(int_clk_en, "INT_CLK_EN follows switch");
    cfg_fpga = 0; cfg_addr = 0; #1; chk(cfg_rdata[23:0] == 24'h01_03_00, "ROOT1 FSREG");
    cfg_fpga = 1; #1; chk(cfg_rdata[23:0] == 24'h02_03_00, "ROOT2 FSREG");
    wr(1'b1, 8'h40, 64'h1_FFFE);      // top closed, only C0
    round_trip(C_TRUE, N_TRUE, "internal bus TRUE");
    round_trip(C_FALSE, N_FALSE, "internal bus FALSE");
    sw_internal = 0;
    round_trip(C_FALSE, N_FALSE, "cable FALSE");
    round_trip(C_TRUE, N_TRUE, "cable TRUE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
