// root_board: the root board (RB) of one crate: ROOT1 (unit and crate
// levels) and ROOT2 (top level) joined by the internal interconnect bus, plus
// the front-panel DIP switches.
//
// Switch S1 (rt_add) is the RB address, readable in ROOT1's FSREG [35:32]; it
// does not affect the root logic.  Switch S2: sw_int_clk_en selects the
// internal clock source and is passed to the clock circuitry as int_clk_en;
// sw_internal connects ROOT1 to ROOT2 over the internal bus (1) or over the
// SRt connector J10 and a cable to a Bank A/B connector (0); sw_fixj10
// enables the J10 pair negation in ROOT1.  The clock circuit itself is
// outside this RTL: clk is the root clock RCLK.
// Configuration: cfg_fpga selects ROOT1 (0) or ROOT2 (1).
module root_board
  import root_pkg::*;
#(
  parameter int unsigned NBOARD  = 16,
  parameter int unsigned NBANK   = 16,
  parameter int unsigned CMD_LEN = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_rst_n,
  input  logic        cfg_we,
  input  logic        cfg_fpga,
  input  logic [7:0]  cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic [63:0] cfg_rdata,
  // front-panel switches
  input  logic [3:0]  rt_add,
  input  logic        sw_int_clk_en,
  input  logic        sw_internal,
  input  logic        sw_fixj10,
  output logic        int_clk_en,
  // backplane
  input  up_code_t    bp_up [NBOARD],
  output dn_link_t    bp_dn [NBOARD],
  // SRt connector (J10)
  output up_code_t    j10_up,
  input  dn_link_t    j10_dn,
  // Bank A / Bank B connectors C0..C15
  input  up_code_t    bank_up [NBANK],
  output dn_link_t    bank_dn [NBANK],
  // ROOT2 towards a higher level
  output up_code_t    hi_up,
  input  dn_link_t    hi_dn
);

  up_code_t    ib_up;
  dn_link_t    ib_dn;
  logic [63:0] rd1, rd2;

  root1 #(.BOARDS_PER_UNIT(4), .UNITS(NBOARD / 4), .CMD_LEN(CMD_LEN)) u_root1 (
    .clk(clk), .rst_n(rst_n), .cfg_rst_n(cfg_rst_n),
    .cfg_we(cfg_we && !cfg_fpga), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .cfg_rdata(rd1), .rt_add(rt_add), .sw_internal(sw_internal),
    .sw_fixj10(sw_fixj10), .bp_up(bp_up), .bp_dn(bp_dn),
    .int_up(ib_up), .int_dn(ib_dn), .j10_up(j10_up), .j10_dn(j10_dn));

  root2 #(.NCHILD(NBANK), .CMD_LEN(CMD_LEN)) u_root2 (
    .clk(clk), .rst_n(rst_n), .cfg_rst_n(cfg_rst_n),
    .cfg_we(cfg_we && cfg_fpga), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
    .cfg_rdata(rd2), .sw_internal(sw_internal),
    .bank_up(bank_up), .bank_dn(bank_dn), .int_up(ib_up), .int_dn(ib_dn),
    .hi_up(hi_up), .hi_dn(hi_dn));

  assign cfg_rdata  = cfg_fpga ? rd2 : rd1;
  assign int_clk_en = sw_int_clk_en;

endmodule
