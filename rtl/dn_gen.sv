// dn_gen: selects the downward command a root level sends to its sub-systems.
//
// Closed level: the command is generated here, from the reduced upward
// command (KILL, TRUE, FALSE, and TRIG when tsel = 0) and from the
// command-register pulses (KILL, RST, and TRIG when tsel = 1); incoming
// downward commands are ignored.
// Open level: the incoming downward command and RST are forwarded.
// Precedence KILL > TRIG > TRUE > FALSE; RST is a separate wire.
// Closed/open behaviour, the two TRIG sources and the precedence follow the
// document.  That a level's own command-register KILL/RST (and TRIG with
// tsel = 1) also act when the level is open, merged with the forwarded
// command, is this design's choice.  An upward ALL creates no downward
// command.  Purely combinational.
module dn_gen
  import root_pkg::*;
(
  input  logic    closed,
  input  logic    tsel,       // 1: TRIG from command register, 0: from upward TRIG
  input  up_cmd_e red_cmd,    // reduction of the upward commands
  input  dn_cmd_e dn_in,      // from the next higher level
  input  logic    rst_in,
  input  logic    kill_cmd,   // command-register pulses
  input  logic    trig_cmd,
  input  logic    rst_cmd,
  output dn_cmd_e dn_out,
  output logic    rst_out
);

  always_comb begin
    logic k, t, tr, f;
    if (closed) begin
      k  = (red_cmd == U_KILL) | kill_cmd;
      t  = tsel ? trig_cmd : (red_cmd == U_TRIG);
      tr = (red_cmd == U_TRUE);
      f  = (red_cmd == U_FALSE);
      rst_out = rst_cmd;
    end else begin
      k  = (dn_in == D_KILL) | kill_cmd;
      t  = (dn_in == D_TRIG) | (tsel & trig_cmd);
      tr = (dn_in == D_TRUE);
      f  = (dn_in == D_FALSE);
      rst_out = rst_in | rst_cmd;
    end
    if (k)       dn_out = D_KILL;
    else if (t)  dn_out = D_TRIG;
    else if (tr) dn_out = D_TRUE;
    else if (f)  dn_out = D_FALSE;
    else         dn_out = D_NOP;
  end

endmodule
