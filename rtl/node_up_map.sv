// node_up_map: upward command of one node as seen by its halfboard level.
//
// The node's own KILL and TRIG codes on IFS/IFD2/IFD1 are not used (the node
// cannot always send KILL, e.g. during a global IF).  Instead:
//   STATUS_1 = 1 (exception)  -> KILL
//   STATUS_2 = 1 (I2C mode)   -> ALL  (becomes TRIG at the halfboard unless
//                                      every node is in I2C mode)
//   IFS/IFD2/IFD1 = TRUE/FALSE -> TRUE/FALSE (local condition)
//   otherwise                  -> NOP
// Mapping from the document.  The alternative TRIG source (a node's
// TXTRIGGER) has no configuration bit in ROOT0 and is not provided.
// Combinational; the root signals come from the processor clock domain and
// are sampled by the registers of root_level.
module node_up_map
  import root_pkg::*;
(
  input  logic     status1,
  input  logic     status2,
  input  dn_sig_t  node_sig,   // IFS, IFD2, IFD1 driven by the node
  output up_code_t up_code
);

  always_comb begin
    dn_cmd_e c;
    c = dn_decode(node_sig);
    if (status1)           up_code = up_encode(U_KILL);
    else if (status2)      up_code = up_encode(U_ALL);
    else if (c == D_TRUE)  up_code = up_encode(U_TRUE);
    else if (c == D_FALSE) up_code = up_encode(U_FALSE);
    else                   up_code = UP_NOP_CODE;
  end

endmodule
