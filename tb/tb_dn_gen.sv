// tb_dn_gen: exhaustive test of the downward command selection over every
// combination of mode, TRIG select, reduced upward command, incoming
// downward command, RST and command-register pulses.
module tb_dn_gen;
  import root_pkg::*;
  int checks = 0, failures = 0;
  logic closed, tsel, rst_in, kill_cmd, trig_cmd, rst_cmd, rst_out;
  up_cmd_e red_cmd;
  dn_cmd_e dn_in, dn_out;

  dn_gen dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    up_cmd_e ulist [6] = '{U_NOP, U_FALSE, U_TRUE, U_TRIG, U_ALL, U_KILL};
    dn_cmd_e dlist [5] = '{D_NOP, D_FALSE, D_TRUE, D_TRIG, D_KILL};
    for (int v = 0; v < 64; v++)
      for (int u = 0; u < 6; u++)
        for (int d = 0; d < 5; d++) begin
          dn_cmd_e exp;
          logic    exp_rst;
          {closed, tsel, rst_in, kill_cmd, trig_cmd, rst_cmd} = 6'(v);
          red_cmd = ulist[u];
          dn_in   = dlist[d];
          #1;
          // expected: list of requested commands, highest wins
          exp = D_NOP;
          if (closed) begin
            if (red_cmd == U_FALSE) exp = D_FALSE;
            if (red_cmd == U_TRUE)  exp = D_TRUE;
            if ((tsel && trig_cmd) || (!tsel && red_cmd == U_TRIG)) exp = D_TRIG;
            if (red_cmd == U_KILL || kill_cmd) exp = D_KILL;
            exp_rst = rst_cmd;
          end else begin
            exp = dn_in;
            if (tsel && trig_cmd && exp != D_KILL) exp = D_TRIG;
            if (kill_cmd) exp = D_KILL;
            exp_rst = rst_in | rst_cmd;
          end
          checks++;
          if (dn_out !== exp || rst_out !== exp_rst) begin
            failures++;
            if (failures < 10)
              $display("mismatch v=%b red=%s in=%s: got %s/%b exp %s/%b", v[5:0],
                       red_cmd.name(), dn_in.name(), dn_out.name(), rst_out, exp.name(), exp_rst);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
