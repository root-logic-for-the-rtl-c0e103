// up_reduce: reduction of the upward commands of the NCHILD sub-systems of
// one root level.
//
// Each child's three upward wires are decoded; children whose mask bit is 1
// (partition register) are ignored.  Over the remaining children:
//   KILL  if any child sends KILL                       (reduction "any")
//   ALL   if every child sends ALL                      (reduction "all")
//   TRIG  if any child sends TRIG or ALL                (reduction "any")
//   TRUE  if every child sends a condition and all are TRUE
//   FALSE if every child sends a condition and one is FALSE
//   NOP   otherwise, and always when every child is masked.
// The reductions, their precedence, and waiting for every child to send its
// condition before the AND is evaluated follow the document. Treating a
// child's ALL as TRIG at the next level ("some, but not all, nodes in I2C
// mode") and NOP for an empty partition are this design's choices.
// Purely combinational; the result is registered by root_level.
module up_reduce
  import root_pkg::*;
#(
  parameter int unsigned NCHILD = 4
) (
  input  up_code_t          up_in [NCHILD],
  input  logic [NCHILD-1:0] mask,       // 1 = child ignored
  output up_cmd_e           red_cmd,
  output up_code_t          red_code
);

  always_comb begin
    logic any_act, any_kill, all_all, any_trig, all_cond, any_false;
    up_cmd_e c;
    any_act   = 1'b0;
    any_kill  = 1'b0;
    all_all   = 1'b1;
    any_trig  = 1'b0;
    all_cond  = 1'b1;
    any_false = 1'b0;
    for (int i = 0; i < int'(NCHILD); i++) begin
      c = up_decode(up_in[i]);
      if (!mask[i]) begin
        any_act   = 1'b1;
        any_kill  = any_kill | (c == U_KILL);
        all_all   = all_all & (c == U_ALL);
        any_trig  = any_trig | (c == U_TRIG) | (c == U_ALL);
        all_cond  = all_cond & ((c == U_TRUE) | (c == U_FALSE));
        any_false = any_false | (c == U_FALSE);
      end
    end
    if (!any_act)      red_cmd = U_NOP;
    else if (any_kill) red_cmd = U_KILL;
    else if (all_all)  red_cmd = U_ALL;
    else if (any_trig) red_cmd = U_TRIG;
    else if (all_cond) red_cmd = any_false ? U_FALSE : U_TRUE;
    else               red_cmd = U_NOP;
    red_code = up_encode(red_cmd);
  end

endmodule
