// tb_node_up_map: exhaustive test of the node pin to upward command mapping.
module tb_node_up_map;
  import root_pkg::*;
  int checks = 0, failures = 0;
  logic status1, status2;
  dn_sig_t node_sig;
  up_code_t up_code;

  node_up_map dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [2:0] exp;
      {status1, status2, node_sig} = 5'(v);
      #1;
      // node code {IFS,IFD2,IFD1}: TRUE 000, FALSE 010 -> upward TRUE 110 / FALSE 010
      if (status1)                   exp = 3'b011;
      else if (status2)              exp = 3'b100;
      else if (node_sig == 3'b000)   exp = 3'b110;
      else if (node_sig == 3'b010)   exp = 3'b010;
      else                           exp = 3'b000;
      checks++;
      if (up_code !== exp) begin
        failures++;
        $display("mismatch s1=%b s2=%b sig=%b got %b exp %b", status1, status2, node_sig, up_code, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
