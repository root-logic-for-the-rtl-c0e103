// level_regs: configuration of one ROOT1/ROOT2 root level.
//
// Partition register (U*PREG, CPREG, TPREG) at address PREG_ADDR:
//   [NCHILD-1:0] mask of the sub-systems (1 = upward commands ignored)
//   [16]         closed (1) / open (0)
//   [17]         TRIG select: 1 = downward TRIG from the command register,
//                0 = from the upward TRIG
// Command register (U*CREG, CCREG, TCREG) at address CREG_ADDR:
//   [0] KILL, [1] TRIG, [2] RREQ (RST) - writing 1 starts an 8-cycle command
//   [3] RDONE, read only: the last RST command has completed
// The registers and their contents are named by the document; bit positions
// and addresses are this design's choice.  The registers are reset only by
// cfg_rst_n (the I2C reset), never by a root RST command; the command timers
// use rst_n.  Register port: synchronous write on clk, combinational read
// (rdata is 0 for other addresses so several banks can be ORed).
module level_regs
  import root_pkg::*;
#(
  parameter int unsigned NCHILD    = 4,
  parameter logic [7:0]  PREG_ADDR = 8'h01,
  parameter logic [7:0]  CREG_ADDR = 8'h02,
  parameter int unsigned CMD_LEN   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_rst_n,
  input  logic              cfg_we,
  input  logic [7:0]        cfg_addr,
  input  logic [63:0]       cfg_wdata,
  output logic [63:0]       cfg_rdata,
  output logic [NCHILD-1:0] mask,
  output logic              closed,
  output logic              tsel,
  output logic              kill_cmd,
  output logic              trig_cmd,
  output logic              rst_cmd
);

  logic [NCHILD-1:0] mask_q;
  logic              closed_q, tsel_q;
  logic [2:0]        creg_q;
  logic              wr_c, rdone;

  assign wr_c = cfg_we && (cfg_addr == CREG_ADDR);

  always_ff @(posedge clk or negedge cfg_rst_n) begin
    if (!cfg_rst_n) begin
      mask_q   <= '0;
      closed_q <= 1'b0;
      tsel_q   <= 1'b0;
      creg_q   <= '0;
    end else if (cfg_we) begin
      if (cfg_addr == PREG_ADDR) begin
        mask_q   <= cfg_wdata[NCHILD-1:0];
        closed_q <= cfg_wdata[16];
        tsel_q   <= cfg_wdata[17];
      end
      if (cfg_addr == CREG_ADDR) creg_q <= cfg_wdata[2:0];
    end
  end

  cmd_pulse #(.CMD_LEN(CMD_LEN)) u_kill (
    .clk(clk), .rst_n(rst_n), .start(wr_c && cfg_wdata[0]), .active(kill_cmd), .done());
  cmd_pulse #(.CMD_LEN(CMD_LEN)) u_trig (
    .clk(clk), .rst_n(rst_n), .start(wr_c && cfg_wdata[1]), .active(trig_cmd), .done());
  cmd_pulse #(.CMD_LEN(CMD_LEN)) u_rst (
    .clk(clk), .rst_n(rst_n), .start(wr_c && cfg_wdata[2]), .active(rst_cmd), .done(rdone));

  assign mask   = mask_q;
  assign closed = closed_q;
  assign tsel   = tsel_q;

  always_comb begin
    cfg_rdata = '0;
    if (cfg_addr == PREG_ADDR) begin
      cfg_rdata[NCHILD-1:0] = mask_q;
      cfg_rdata[16]         = closed_q;
      cfg_rdata[17]         = tsel_q;
    end else if (cfg_addr == CREG_ADDR) begin
      cfg_rdata[2:0] = creg_q;
      cfg_rdata[3]   = rdone;
    end
  end

endmodule
