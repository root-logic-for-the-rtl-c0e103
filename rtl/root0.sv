// root0: root logic of one processing board (halfboard and board levels),
// the ROOT0 part of the board's PALREG FPGA.
//
// Upward: each node's STATUS_1, STATUS_2 and IFS/IFD2/IFD1 are mapped to an
// upward command (node_up_map); two halfboard levels reduce 8 nodes each, the
// board level reduces the two halfboards and sends the result over the
// backplane to ROOT1 (bp_up).
// Downward: the board level forwards the backplane command (open) or
// generates its own (closed); each halfboard does the same one level lower.
// Towards the nodes every halfboard command passes the stability filter
// (gfilter, NSTAB cycles) and the global-condition lock (glock) and is
// driven, encoded, on the IFS/IFD2/IFD1 lines shared by the 8 nodes.  RST
// drives the RESET_7512 wire of the board.
//
// Register RCREG at cfg address 0x02 (document's I2C address), 64 bits:
//   [31:16] node mask, bit 16+n masks node n (1 = ignored); nodes 0-7 form
//           halfboard 0, nodes 8-15 halfboard 1
//   [32] close halfboard 0, [33] close halfboard 1, [34] close board
//   [35] KILL request (write 1: 8-cycle downward KILL to both halfboards)
//   [36] RST request (write 1: 8-cycle RST of all nodes of the board)
//   [37] RST done, read only
// FSREG at cfg address 0x00, read only.
// Bits 16..37 follow the document except bit 35 (KILL), which is this
// design's choice, as is masking a closed halfboard at the board level (no
// board-level mask is given) and the FSREG address and contents.  TRIG
// towards the nodes always comes from the upward TRIG (no TRIG select).
// RCREG is reset by cfg_rst_n only; rst_n resets the root-internal state.
// Latency: node pins to bp_up 2 cycles; bp_dn to node lines
// 2 (levels) + NSTAB (filter) + 1 (lock) cycles.
module root0
  import root_pkg::*;
#(
  parameter int unsigned NODES_PER_HB = 8,
  parameter int unsigned NSTAB        = 3,
  parameter int unsigned CMD_LEN      = 8,
  parameter int unsigned GLOCK_LEN    = 8,
  localparam int unsigned NNODE       = 2 * NODES_PER_HB
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_rst_n,
  input  logic        cfg_we,
  input  logic [7:0]  cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic [63:0] cfg_rdata,
  // nodes
  input  logic        status1  [NNODE],
  input  logic        status2  [NNODE],
  input  dn_sig_t     node_sig [NNODE],
  output dn_sig_t     node_dn  [2],      // per halfboard, to its nodes
  output logic        reset_7512,
  // backplane to ROOT1
  output up_code_t    bp_up,
  input  dn_link_t    bp_dn
);

  localparam logic [7:0] RCREG_ADDR = 8'h02;
  localparam logic [7:0] FSREG_ADDR = 8'h00;

  logic [63:0] rcreg;
  logic        kill_act, rst_act, rst_done;
  logic        wr_rc;

  assign wr_rc = cfg_we && (cfg_addr == RCREG_ADDR);

  always_ff @(posedge clk or negedge cfg_rst_n) begin
    if (!cfg_rst_n)  rcreg <= '0;
    else if (wr_rc)  rcreg <= cfg_wdata;
  end

  cmd_pulse #(.CMD_LEN(CMD_LEN)) u_kill (
    .clk(clk), .rst_n(rst_n), .start(wr_rc && cfg_wdata[35]), .active(kill_act), .done());
  cmd_pulse #(.CMD_LEN(CMD_LEN)) u_rst (
    .clk(clk), .rst_n(rst_n), .start(wr_rc && cfg_wdata[36]), .active(rst_act), .done(rst_done));

  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr == RCREG_ADDR) begin
      cfg_rdata     = rcreg;
      cfg_rdata[37] = rst_done;
    end else if (cfg_addr == FSREG_ADDR) begin
      cfg_rdata = fsreg_value(8'h00, 8'h00, 8'h05);
    end
  end

  // ---------------------------------------------------------------- upward
  up_code_t node_code [NNODE];
  for (genvar n = 0; n < int'(NNODE); n++) begin : g_node
    node_up_map u_map (
      .status1 (status1[n]),
      .status2 (status2[n]),
      .node_sig(node_sig[n]),
      .up_code (node_code[n])
    );
  end

  up_code_t hb_up   [2];
  dn_cmd_e  hb_dn   [2];
  logic     hb_rst  [2];
  up_cmd_e  hb_red  [2];
  dn_cmd_e  bd_dn;
  logic     bd_rst;
  up_cmd_e  bd_red;

  for (genvar h = 0; h < 2; h++) begin : g_hb
    up_code_t hb_in [NODES_PER_HB];
    dn_cmd_e  filt, lck;
    for (genvar n = 0; n < int'(NODES_PER_HB); n++) begin : g_in
      assign hb_in[n] = node_code[h*NODES_PER_HB + n];
    end

    root_level #(.NCHILD(NODES_PER_HB)) u_lvl (
      .clk     (clk),
      .rst_n   (rst_n),
      .up_in   (hb_in),
      .mask    (rcreg[16 + h*NODES_PER_HB +: NODES_PER_HB]),
      .closed  (rcreg[32 + h]),
      .tsel    (1'b0),
      .kill_cmd(kill_act),
      .trig_cmd(1'b0),
      .rst_cmd (rst_act),
      .dn_in   (bd_dn),
      .rst_in  (bd_rst),
      .up_out  (hb_up[h]),
      .red_cmd (hb_red[h]),
      .dn_out  (hb_dn[h]),
      .rst_out (hb_rst[h])
    );

    gfilter #(.NSTAB(NSTAB)) u_filt (
      .clk(clk), .rst_n(rst_n), .d(hb_dn[h]), .q(filt));

    glock #(.NSTAB(NSTAB), .GLOCK_LEN(GLOCK_LEN)) u_lock (
      .clk(clk), .rst_n(rst_n), .d(filt), .q(lck), .locked());

    assign node_dn[h] = dn_encode(lck);
  end

  root_level #(.NCHILD(2)) u_board (
    .clk     (clk),
    .rst_n   (rst_n),
    .up_in   (hb_up),
    .mask    (rcreg[33:32]),
    .closed  (rcreg[34]),
    .tsel    (1'b0),
    .kill_cmd(1'b0),
    .trig_cmd(1'b0),
    .rst_cmd (1'b0),
    .dn_in   (dn_decode(bp_dn.sig)),
    .rst_in  (bp_dn.rst),
    .up_out  (bp_up),
    .red_cmd (bd_red),
    .dn_out  (bd_dn),
    .rst_out (bd_rst)
  );

  assign reset_7512 = hb_rst[0] | hb_rst[1];

endmodule
