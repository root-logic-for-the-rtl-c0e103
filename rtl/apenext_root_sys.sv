// apenext_root_sys: the root tree of an apeNEXT machine of NCRATE crates in
// the multi-crate configuration.
//
// Each crate has a root board (root_board: ROOT1 + ROOT2) and 16 processing
// boards (root0, 16 nodes each), joined by the backplane.  The root board of
// crate 0 is the master: its ROOT2 is the top level.  The SRt connector (J10)
// of crate k is cabled to connector Ck of the master's Bank A/B; crate 0
// either uses the same kind of cable to its own C0 or, with sw_internal = 1,
// the internal bus.  The ROOT2 of the other crates has nothing connected.
// The master's ROOT2 output towards a (not existing) higher level is brought
// out as top_up; its downward input from above is idle.
//
// Node pins are ports (the nodes are outside this RTL): per crate, board and
// node STATUS_1, STATUS_2 and the upward IFS/IFD2/IFD1; per board and
// halfboard the downward IFS/IFD2/IFD1; per board RESET_7512.
// Configuration: one register port; cfg_crate picks the crate, cfg_dev the
// device (0..15: ROOT0 of that board, 16: ROOT1, 17: ROOT2).  Reads are
// combinational.  This port stands in for the I2C channels of the machine.
// All levels run on one root clock clk; rst_n resets the root-internal
// state, cfg_rst_n the configuration registers.
module apenext_root_sys
  import root_pkg::*;
#(
  parameter int unsigned NCRATE = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_rst_n,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_crate,
  input  logic [4:0]  cfg_dev,
  input  logic [7:0]  cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic [63:0] cfg_rdata,
  input  logic [3:0]  rt_add        [NCRATE],
  input  logic        sw_int_clk_en [NCRATE],
  input  logic        sw_internal   [NCRATE],
  input  logic        sw_fixj10     [NCRATE],
  output logic        int_clk_en    [NCRATE],
  input  logic        status1    [NCRATE][16][16],
  input  logic        status2    [NCRATE][16][16],
  input  dn_sig_t     node_sig   [NCRATE][16][16],
  output dn_sig_t     node_dn    [NCRATE][16][2],
  output logic        reset_7512 [NCRATE][16],
  output up_code_t    top_up
);

  localparam dn_link_t IDLE = DN_LINK_IDLE;

  up_code_t    j10_up  [NCRATE];
  dn_link_t    j10_dn  [NCRATE];
  dn_link_t    mbank_dn[NCRATE][16];
  up_code_t    mbank_up[16];
  up_code_t    nobank  [16];
  logic [63:0] rd_rb   [NCRATE];
  logic [63:0] rd_r0   [NCRATE][16];
  up_code_t    hi_up   [NCRATE];

  for (genvar k = 0; k < 16; k++) begin : g_bank
    assign mbank_up[k] = (k < int'(NCRATE)) ? j10_up[k % NCRATE] : UP_NOP_CODE;
    assign nobank[k]   = UP_NOP_CODE;
  end

  for (genvar c = 0; c < int'(NCRATE); c++) begin : g_crate
    up_code_t bp_up [16];
    dn_link_t bp_dn [16];
    up_code_t bank  [16];
    logic     sel;

    for (genvar k = 0; k < 16; k++) begin : g_bk
      assign bank[k] = (c == 0) ? mbank_up[k] : nobank[k];
    end

    assign sel = (cfg_crate == 4'(c));

    root_board #(.NBOARD(16), .NBANK(16)) u_rb (
      .clk(clk), .rst_n(rst_n), .cfg_rst_n(cfg_rst_n),
      .cfg_we(cfg_we && sel && (cfg_dev >= 5'd16)), .cfg_fpga(cfg_dev == 5'd17),
      .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_rdata(rd_rb[c]),
      .rt_add(rt_add[c]), .sw_int_clk_en(sw_int_clk_en[c]),
      .sw_internal(sw_internal[c]), .sw_fixj10(sw_fixj10[c]),
      .int_clk_en(int_clk_en[c]),
      .bp_up(bp_up), .bp_dn(bp_dn),
      .j10_up(j10_up[c]), .j10_dn(j10_dn[c]),
      .bank_up(bank), .bank_dn(mbank_dn[c]),
      .hi_up(hi_up[c]), .hi_dn(IDLE));

    assign j10_dn[c] = mbank_dn[0][c];

    for (genvar b = 0; b < 16; b++) begin : g_board
      root0 u_r0 (
        .clk(clk), .rst_n(rst_n), .cfg_rst_n(cfg_rst_n),
        .cfg_we(cfg_we && sel && (cfg_dev == 5'(b))),
        .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata), .cfg_rdata(rd_r0[c][b]),
        .status1(status1[c][b]), .status2(status2[c][b]),
        .node_sig(node_sig[c][b]), .node_dn(node_dn[c][b]),
        .reset_7512(reset_7512[c][b]),
        .bp_up(bp_up[b]), .bp_dn(bp_dn[b]));
    end
  end

  assign top_up = hi_up[0];

  always_comb begin
    cfg_rdata = '0;
    for (int c = 0; c < int'(NCRATE); c++) begin
      if (cfg_crate == 4'(c)) begin
        if (cfg_dev >= 5'd16) cfg_rdata = rd_rb[c];
        else                  cfg_rdata = rd_r0[c][cfg_dev[3:0]];
      end
    end
  end

endmodule
