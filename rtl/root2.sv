// root2: top-level root logic (FPGA2 of the root board) in the multi-crate
// configuration.
//
// One root level with NCHILD crate inputs, the connectors C0..C15 of Bank A
// and Bank B.  With sw_internal = 1, input 0 is taken from the internal
// interconnect bus to ROOT1 of the same root board instead of connector C0.
// The downward command is broadcast on all connectors and on the internal
// bus.  The reduced upward command is sent out on hi_up and the level can
// forward hi_dn when open, for a higher level that the multi-crate
// configuration does not have (keep it closed there, or tie hi_dn idle).
//
// Registers: 0x00 FSREG (type 02, version 03, revision 00), 0x40 TPREG,
// 0x41 TCREG (see level_regs); addresses are this design's choice.
// Latency: one cycle per direction.
module root2
  import root_pkg::*;
#(
  parameter int unsigned NCHILD  = 16,
  parameter int unsigned CMD_LEN = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_rst_n,
  input  logic        cfg_we,
  input  logic [7:0]  cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic [63:0] cfg_rdata,
  input  logic        sw_internal,
  // crate connectors C0..C(NCHILD-1)
  input  up_code_t    bank_up [NCHILD],
  output dn_link_t    bank_dn [NCHILD],
  // internal interconnect bus to ROOT1
  input  up_code_t    int_up,
  output dn_link_t    int_dn,
  // towards a higher level
  output up_code_t    hi_up,
  input  dn_link_t    hi_dn
);

  logic [NCHILD-1:0] mask;
  logic     closed, tsel, kc, tc, rc;
  logic [63:0] rd;
  up_code_t cin [NCHILD];
  dn_cmd_e  dn;
  logic     rst;
  up_cmd_e  red;
  dn_link_t link;

  level_regs #(.NCHILD(NCHILD), .PREG_ADDR(8'h40), .CREG_ADDR(8'h41),
               .CMD_LEN(CMD_LEN)) u_regs (
    .clk(clk), .rst_n(rst_n), .cfg_rst_n(cfg_rst_n), .cfg_we(cfg_we),
    .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_rdata(rd),
    .mask(mask), .closed(closed), .tsel(tsel),
    .kill_cmd(kc), .trig_cmd(tc), .rst_cmd(rc));

  always_comb begin
    for (int k = 0; k < int'(NCHILD); k++) cin[k] = bank_up[k];
    if (sw_internal) cin[0] = int_up;
  end

  root_level #(.NCHILD(NCHILD)) u_top (
    .clk(clk), .rst_n(rst_n), .up_in(cin), .mask(mask), .closed(closed),
    .tsel(tsel), .kill_cmd(kc), .trig_cmd(tc), .rst_cmd(rc),
    .dn_in(dn_decode(hi_dn.sig)), .rst_in(hi_dn.rst),
    .up_out(hi_up), .red_cmd(red), .dn_out(dn), .rst_out(rst));

  assign link = '{rst: rst, sig: dn_encode(dn)};
  assign int_dn = link;
  for (genvar k = 0; k < int'(NCHILD); k++) begin : g_out
    assign bank_dn[k] = link;
  end

  assign cfg_rdata = (cfg_addr == 8'h00) ? fsreg_value(8'h02, 8'h03, 8'h00) : rd;

endmodule
