// root1: root logic of the unit and crate levels (FPGA1 of the root board).
//
// Four unit levels each reduce the upward commands of 4 processing boards
// (ROOT0, over the backplane); the crate level reduces the 4 units and sends
// the result to ROOT2.  Downward, each level forwards (open) or generates
// (closed) and the unit levels drive the backplane links of their boards.
// The link to ROOT2 is either the internal interconnect bus of the root board
// (sw_internal = 1) or the SRt connector J10 (sw_internal = 0).  With
// sw_fixj10 = 1 the upward wires selected by FIXJ10_MASK are inverted on J10,
// for root boards whose J10 wiring of that pair is reversed.
//
// Registers (cfg addresses are this design's choice):
//   0x00 FSREG  read only: type 01, version 03, revision 00; [35:32] RT_ADD
//   0x10+u UuPREG, 0x20+u UuCREG (u = 0..3)   see level_regs
//   0x30 CPREG, 0x31 CCREG                     see level_regs
// The level structure, the registers' names and the two switches follow the
// document; the pair negated on J10 (FIXJ10_MASK) is this design's choice.
// Latency: one cycle per level and direction.
module root1
  import root_pkg::*;
#(
  parameter int unsigned BOARDS_PER_UNIT = 4,
  parameter int unsigned UNITS           = 4,
  parameter int unsigned CMD_LEN         = 8,
  parameter logic [2:0]  FIXJ10_MASK     = 3'b001,
  localparam int unsigned NBOARD         = BOARDS_PER_UNIT * UNITS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_rst_n,
  input  logic        cfg_we,
  input  logic [7:0]  cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic [63:0] cfg_rdata,
  input  logic [3:0]  rt_add,
  input  logic        sw_internal,
  input  logic        sw_fixj10,
  // backplane to the processing boards
  input  up_code_t    bp_up [NBOARD],
  output dn_link_t    bp_dn [NBOARD],
  // link to ROOT2
  output up_code_t    int_up,
  input  dn_link_t    int_dn,
  output up_code_t    j10_up,
  input  dn_link_t    j10_dn
);

  logic [63:0] rd_unit [UNITS];
  logic [63:0] rd_crate;

  up_code_t unit_up  [UNITS];
  dn_cmd_e  crate_dn;
  logic     crate_rst;
  up_code_t crate_up;
  up_cmd_e  crate_red;

  for (genvar u = 0; u < int'(UNITS); u++) begin : g_unit
    logic [BOARDS_PER_UNIT-1:0] mask;
    logic     closed, tsel, kc, tc, rc;
    up_code_t uin [BOARDS_PER_UNIT];
    dn_cmd_e  udn;
    logic     urst;
    up_cmd_e  ured;

    level_regs #(.NCHILD(BOARDS_PER_UNIT), .PREG_ADDR(8'h10 + 8'(u)),
                 .CREG_ADDR(8'h20 + 8'(u)), .CMD_LEN(CMD_LEN)) u_regs (
      .clk(clk), .rst_n(rst_n), .cfg_rst_n(cfg_rst_n), .cfg_we(cfg_we),
      .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_rdata(rd_unit[u]),
      .mask(mask), .closed(closed), .tsel(tsel),
      .kill_cmd(kc), .trig_cmd(tc), .rst_cmd(rc));

    for (genvar b = 0; b < int'(BOARDS_PER_UNIT); b++) begin : g_b
      assign uin[b] = bp_up[u*BOARDS_PER_UNIT + b];
      assign bp_dn[u*BOARDS_PER_UNIT + b] = '{rst: urst, sig: dn_encode(udn)};
    end

    root_level #(.NCHILD(BOARDS_PER_UNIT)) u_lvl (
      .clk(clk), .rst_n(rst_n), .up_in(uin), .mask(mask), .closed(closed),
      .tsel(tsel), .kill_cmd(kc), .trig_cmd(tc), .rst_cmd(rc),
      .dn_in(crate_dn), .rst_in(crate_rst),
      .up_out(unit_up[u]), .red_cmd(ured), .dn_out(udn), .rst_out(urst));
  end

  logic [UNITS-1:0] cmask;
  logic     cclosed, ctsel, ckc, ctc, crc;
  dn_link_t link_dn;

  level_regs #(.NCHILD(UNITS), .PREG_ADDR(8'h30), .CREG_ADDR(8'h31),
               .CMD_LEN(CMD_LEN)) u_cregs (
    .clk(clk), .rst_n(rst_n), .cfg_rst_n(cfg_rst_n), .cfg_we(cfg_we),
    .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_rdata(rd_crate),
    .mask(cmask), .closed(cclosed), .tsel(ctsel),
    .kill_cmd(ckc), .trig_cmd(ctc), .rst_cmd(crc));

  assign link_dn = sw_internal ? int_dn : j10_dn;

  root_level #(.NCHILD(UNITS)) u_crate (
    .clk(clk), .rst_n(rst_n), .up_in(unit_up), .mask(cmask), .closed(cclosed),
    .tsel(ctsel), .kill_cmd(ckc), .trig_cmd(ctc), .rst_cmd(crc),
    .dn_in(dn_decode(link_dn.sig)), .rst_in(link_dn.rst),
    .up_out(crate_up), .red_cmd(crate_red), .dn_out(crate_dn), .rst_out(crate_rst));

  assign int_up = sw_internal ? crate_up : UP_NOP_CODE;
  assign j10_up = sw_internal ? UP_NOP_CODE
                              : (crate_up ^ (sw_fixj10 ? FIXJ10_MASK : 3'b000));

  always_comb begin
    cfg_rdata = rd_crate;
    for (int u = 0; u < int'(UNITS); u++) cfg_rdata |= rd_unit[u];
    if (cfg_addr == 8'h00) cfg_rdata = fsreg_value(8'h01, 8'h03, 8'h00) | {28'd0, rt_add, 32'd0};
  end

endmodule
