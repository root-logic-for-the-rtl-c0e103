// glock: global-condition lock at the lowest root level.
//
// A downward TRUE or FALSE is sent to the nodes for exactly GLOCK_LEN RCLK
// cycles and then removed.  Afterwards further TRUE/FALSE commands are
// ignored until the input has carried no TRUE/FALSE for at least NSTAB
// consecutive cycles, i.e. until the nodes' response (they stop sending
// their condition) has travelled through the whole tree and back.  This
// keeps the minimum distance between two global IFs near NSTAB cycles
// instead of a full tree round trip.  KILL and TRIG pass straight through and
// take precedence over a locked condition.
// Behaviour from the document; GLOCK_LEN = 8 (the length of root-generated
// commands) and counting the absence from the start of the command are this
// design's choices.  Output is registered: one cycle latency.
module glock
  import root_pkg::*;
#(
  parameter int unsigned NSTAB     = 3,
  parameter int unsigned GLOCK_LEN = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  dn_cmd_e d,
  output dn_cmd_e q,
  output logic    locked   // TRUE/FALSE currently ignored
);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_WAIT} state_e;

  localparam int unsigned LW = $clog2(GLOCK_LEN + 1);
  localparam int unsigned AW = $clog2(NSTAB + 1);

  state_e        st;
  dn_cmd_e       cond;      // latched TRUE/FALSE
  logic [LW-1:0] len;
  logic [AW-1:0] absent;    // consecutive cycles without TRUE/FALSE, saturating
  logic          in_cond;
  logic          absent_ok;

  assign in_cond   = is_cond(d);
  assign absent_ok = !in_cond && (absent >= AW'(NSTAB - 1));
  assign locked    = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      cond   <= D_NOP;
      len    <= '0;
      absent <= AW'(NSTAB);
      q      <= D_NOP;
    end else begin
      if (in_cond) absent <= '0;
      else if (absent < AW'(NSTAB)) absent <= absent + 1'b1;

      case (st)
        S_IDLE: if (in_cond) begin
          st   <= S_SEND;
          cond <= d;
          len  <= LW'(GLOCK_LEN - 1);
        end
        S_SEND: if (len == '0) st <= absent_ok ? S_IDLE : S_WAIT;
                else len <= len - 1'b1;
        default: if (absent_ok) st <= S_IDLE;
      endcase

      if (d == D_KILL || d == D_TRIG)  q <= d;
      else if (st == S_IDLE && in_cond) q <= d;
      else if (st == S_SEND && len != '0) q <= cond;
      else                              q <= D_NOP;
    end
  end

endmodule
