// root_level: one level of the root tree (halfboard, board, unit, crate,
// top).
//
// Upward: the masked reduction of the NCHILD incoming upward commands
// (up_reduce) is registered and always sent to the next higher level, also
// when this level is closed.  Downward: dn_gen selects between generating
// (closed) and forwarding (open); the result and the RST wire are registered
// and broadcast to all children (a closed child ignores them).
// Timing: one RCLK cycle per level and direction (a register on each
// output); this pipelining is this design's choice.  rst_n is the reset of
// the root-internal registers; configuration comes from outside.
module root_level
  import root_pkg::*;
#(
  parameter int unsigned NCHILD = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  up_code_t          up_in [NCHILD],
  input  logic [NCHILD-1:0] mask,
  input  logic              closed,
  input  logic              tsel,
  input  logic              kill_cmd,
  input  logic              trig_cmd,
  input  logic              rst_cmd,
  input  dn_cmd_e           dn_in,
  input  logic              rst_in,
  output up_code_t          up_out,
  output up_cmd_e           red_cmd,    // current reduction, for observation
  output dn_cmd_e           dn_out,
  output logic              rst_out
);

  up_code_t red_code;
  dn_cmd_e  dn_nxt;
  logic     rst_nxt;

  up_reduce #(.NCHILD(NCHILD)) u_red (
    .up_in   (up_in),
    .mask    (mask),
    .red_cmd (red_cmd),
    .red_code(red_code)
  );

  dn_gen u_dn (
    .closed  (closed),
    .tsel    (tsel),
    .red_cmd (red_cmd),
    .dn_in   (dn_in),
    .rst_in  (rst_in),
    .kill_cmd(kill_cmd),
    .trig_cmd(trig_cmd),
    .rst_cmd (rst_cmd),
    .dn_out  (dn_nxt),
    .rst_out (rst_nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_out  <= UP_NOP_CODE;
      dn_out  <= D_NOP;
      rst_out <= 1'b0;
    end else begin
      up_out  <= red_code;
      dn_out  <= dn_nxt;
      rst_out <= rst_nxt;
    end
  end

endmodule
