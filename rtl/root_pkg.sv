// root_pkg: types, encodings and helpers shared by all levels of the apeNEXT
// root logic (the tree of global control signals: KILL, ALL, TRIG, global
// condition TRUE/FALSE and RST).
//
// Upward link: three wires, signal 0..2, packed here as up_code_t = {s2,s1,s0}.
// Encoding (signals 0/1/2):
//   KILL 1 1 0 | ALL 0 0 1 | TRIG 1 0 1 | TRUE 0 1 1 | FALSE 0 1 0 | NOP 0 0 0
// Downward link: IFS, IFD2, IFD1 plus a dedicated RST wire.  Encoding:
//   KILL 0 1 1 | TRIG 0 0 1 | TRUE 0 0 0 | FALSE 0 1 0 | NOP 1 x x
// Both encodings and the precedence order KILL > ALL > TRIG > TRUE > FALSE
// (upward) and RST > KILL > TRIG > TRUE > FALSE (downward) follow the
// document.  The decoded enums are ordered so that a larger value means a
// higher precedence.  Decoding of the two upward codes the table leaves unused
// (s0 alone, all three set) is this design's choice: they decode to the
// highest-precedence command whose wires they contain (TRIG, KILL).
package root_pkg;

  typedef logic [2:0] up_code_t;   // {s2, s1, s0}

  typedef enum logic [2:0] {
    U_NOP   = 3'd0,
    U_FALSE = 3'd1,
    U_TRUE  = 3'd2,
    U_TRIG  = 3'd3,
    U_ALL   = 3'd4,
    U_KILL  = 3'd5
  } up_cmd_e;

  typedef enum logic [2:0] {
    D_NOP   = 3'd0,
    D_FALSE = 3'd1,
    D_TRUE  = 3'd2,
    D_TRIG  = 3'd3,
    D_KILL  = 3'd4
  } dn_cmd_e;

  // Downward root signals towards a lower level or the nodes.
  typedef struct packed {
    logic ifs;
    logic ifd2;
    logic ifd1;
  } dn_sig_t;

  // Downward link between two root FPGAs: encoded command and RST wire.
  typedef struct packed {
    logic    rst;
    dn_sig_t sig;
  } dn_link_t;

  localparam up_code_t UP_NOP_CODE = 3'b000;
  localparam dn_link_t DN_LINK_IDLE = '{rst: 1'b0, sig: '{ifs: 1'b1, ifd2: 1'b0, ifd1: 1'b0}};

  // Firmware status register layout: type [23:16], version [15:8], revision [7:0].
  function automatic logic [63:0] fsreg_value(input logic [7:0] ftype,
                                              input logic [7:0] version,
                                              input logic [7:0] revision);
    return {40'd0, ftype, version, revision};
  endfunction

  function automatic up_code_t up_encode(input up_cmd_e c);
    case (c)
      U_KILL:  return 3'b011;
      U_ALL:   return 3'b100;
      U_TRIG:  return 3'b101;
      U_TRUE:  return 3'b110;
      U_FALSE: return 3'b010;
      default: return 3'b000;
    endcase
  endfunction

  function automatic up_cmd_e up_decode(input up_code_t s);
    if (s[0] && s[1])      return U_KILL;
    else if (s[0])         return U_TRIG;
    else if (s[2] && s[1]) return U_TRUE;
    else if (s[2])         return U_ALL;
    else if (s[1])         return U_FALSE;
    else                   return U_NOP;
  endfunction

  function automatic dn_sig_t dn_encode(input dn_cmd_e c);
    case (c)
      D_KILL:  return '{ifs: 1'b0, ifd2: 1'b1, ifd1: 1'b1};
      D_TRIG:  return '{ifs: 1'b0, ifd2: 1'b0, ifd1: 1'b1};
      D_TRUE:  return '{ifs: 1'b0, ifd2: 1'b0, ifd1: 1'b0};
      D_FALSE: return '{ifs: 1'b0, ifd2: 1'b1, ifd1: 1'b0};
      default: return '{ifs: 1'b1, ifd2: 1'b0, ifd1: 1'b0};
    endcase
  endfunction

  function automatic dn_cmd_e dn_decode(input dn_sig_t s);
    if (s.ifs)                 return D_NOP;
    else if (s.ifd2 && s.ifd1) return D_KILL;
    else if (s.ifd1)           return D_TRIG;
    else if (s.ifd2)           return D_FALSE;
    else                       return D_TRUE;
  endfunction

  function automatic logic is_cond(input dn_cmd_e c);
    return (c == D_TRUE) || (c == D_FALSE);
  endfunction

endpackage
