// tb_up_reduce: random self-checking test of the upward reduction.
// Children send random valid upward codes (written here straight from the
// wire table, signals 0/1/2) under a random mask; the expected result is
// computed from per-command counts.  Includes all-masked partitions.
module tb_up_reduce;
  import root_pkg::*;
  localparam int N = 6;
  // wire codes {s2,s1,s0}: KILL, ALL, TRIG, TRUE, FALSE, NOP
  localparam logic [2:0] C_KILL = 3'b011, C_ALL = 3'b100, C_TRIG = 3'b101,
                         C_TRUE = 3'b110, C_FALSE = 3'b010, C_NOP = 3'b000;
  int checks = 0, failures = 0;
  up_code_t up_in [N];
  logic [N-1:0] mask;
  up_cmd_e red_cmd;
  up_code_t red_code;

  up_reduce #(.NCHILD(N)) dut (.up_in(up_in), .mask(mask), .red_cmd(red_cmd), .red_code(red_code));

  function automatic logic [2:0] pick(int unsigned r);
    case (r % 6)
      0: return C_KILL; 1: return C_ALL; 2: return C_TRIG;
      3: return C_TRUE; 4: return C_FALSE; default: return C_NOP;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits [6];
    for (int i = 0; i < 6; i++) hits[i] = 0;
    for (int it = 0; it < 4000; it++) begin
      int nact, nk, na, nt, ntr, nf;
      logic [2:0] exp;
      int unsigned mode;
      mode = $urandom % 5;
      for (int i = 0; i < N; i++) begin
        case (mode)
          0: up_in[i] = pick($urandom);
          1: up_in[i] = ($urandom % 2) ? C_TRUE : C_FALSE;         // condition
          2: up_in[i] = ($urandom % 8 == 0) ? C_FALSE : C_TRUE;
          3: up_in[i] = ($urandom % 6 == 0) ? C_NOP : C_ALL;
          default: up_in[i] = ($urandom % 10 == 0) ? pick($urandom) : C_TRUE;
        endcase
      end
      mask = N'($urandom);
      if ($urandom % 3 == 0) mask = '0;
      if ($urandom % 50 == 0) mask = '1;
      #1;
      nact = 0; nk = 0; na = 0; nt = 0; ntr = 0; nf = 0;
      for (int i = 0; i < N; i++) if (!mask[i]) begin
        nact++;
        if (up_in[i] == C_KILL)  nk++;
        if (up_in[i] == C_ALL)   na++;
        if (up_in[i] == C_TRIG)  nt++;
        if (up_in[i] == C_TRUE)  ntr++;
        if (up_in[i] == C_FALSE) nf++;
      end
      if (nact == 0)               begin exp = C_NOP;   hits[0]++; end
      else if (nk > 0)             begin exp = C_KILL;  hits[1]++; end
      else if (na == nact)         begin exp = C_ALL;   hits[2]++; end
      else if (nt + na > 0)        begin exp = C_TRIG;  hits[3]++; end
      else if (ntr + nf == nact)   begin exp = (nf > 0) ? C_FALSE : C_TRUE; hits[4]++; end
      else                         begin exp = C_NOP;   hits[5]++; end
      checks++;
      if (red_code !== exp) begin
        failures++;
        if (failures < 10) $display("mismatch: mask=%b got %b exp %b", mask, red_code, exp);
      end
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (hits[i] == 0) begin failures++; $display("case %0d never reached", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
