// tb_level_regs: partition and command register of one level: write/read
// back, outputs, 8-cycle commands, RDONE, and that only cfg_rst_n (not the
// root reset) clears the configuration.
module tb_level_regs;
  import root_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_rst_n = 0, cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [63:0] cfg_wdata = 0, cfg_rdata;
  logic [3:0] mask;
  logic closed, tsel, kill_cmd, trig_cmd, rst_cmd;
  always #5 clk = ~clk;

  level_regs #(.NCHILD(4), .PREG_ADDR(8'h10), .CREG_ADDR(8'h20)) dut (.*);

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [63:0] v);
    cfg_addr = a; cfg_wdata = v; cfg_we = 1; @(negedge clk); cfg_we = 0;
  endtask
  task automatic len(ref logic s, output int n);
    n = 0; while (s && n < 20) begin n++; @(negedge clk); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1; cfg_rst_n = 1;
    wr(8'h10, 64'h0001_0003);
    chk(mask == 4'b0011 && closed && !tsel, "PREG closed only");
    wr(8'h10, 64'h0002_0000);
    chk(mask == 4'b0000 && !closed && tsel, "PREG TRIG select only");
    wr(8'h10, 64'h0003_0005);
    chk(mask == 4'b0101 && closed && tsel, "PREG outputs");
    cfg_addr = 8'h10; #1;
    chk(cfg_rdata == 64'h0003_0005, "PREG read back");
    cfg_addr = 8'h33; #1;
    chk(cfg_rdata == 0, "other address reads 0");
    wr(8'h20, 64'h1);
    len(kill_cmd, n); chk(n == 8, $sformatf("KILL length %0d", n));
    chk(!trig_cmd && !rst_cmd, "only KILL");
    wr(8'h20, 64'h2);
    len(trig_cmd, n); chk(n == 8, $sformatf("TRIG length %0d", n));
    cfg_addr = 8'h20; #1;
    chk(cfg_rdata[3] == 1'b0, "RDONE low before RST");
    wr(8'h20, 64'h4);
    cfg_addr = 8'h20; #1;
    chk(cfg_rdata[2] && !cfg_rdata[3], "RREQ set, RDONE low");
    len(rst_cmd, n); chk(n == 8, $sformatf("RST length %0d", n));
    #1; chk(cfg_rdata[3], "RDONE after RST");
    // root reset keeps configuration
    rst_n = 0; @(negedge clk); rst_n = 1;
    chk(mask == 4'b0101 && closed, "config kept over root reset");
    cfg_rst_n = 0; #1;
    chk(mask == 0 && !closed && !tsel, "config cleared by cfg reset");
    cfg_rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
