// tb_apenext_root_sys: end-to-end test of the root tree of a 4-crate
// machine (1024 nodes) at the default parameters.
//
// A behavioural node model answers the root logic as the processing nodes
// do: a node taking part in a global IF drives its local condition on
// IFS/IFD2/IFD1 until it receives a downward TRUE or FALSE, then returns to
// NOP and records the result.  KILL and TRIG arriving at the nodes are
// counted.  Crate 0's ROOT2 is the closed top level; all other levels start
// open.  Each mechanism of the design is made to happen and counted; a
// mechanism that never happened counts as a failure.
module tb_apenext_root_sys;
  import root_pkg::*;
  localparam int NC = 4;
  localparam logic [2:0] C_ALL = 3'b100;
  localparam logic [2:0] N_KILL = 3'b011, N_TRIG = 3'b001, N_TRUE = 3'b000,
                         N_FALSE = 3'b010, N_NOP = 3'b100;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_rst_n = 0, cfg_we = 0;
  logic [3:0]  cfg_crate = 0;
  logic [4:0]  cfg_dev = 0;
  logic [7:0]  cfg_addr = 0;
  logic [63:0] cfg_wdata = 0, cfg_rdata;
  logic [3:0]  rt_add        [NC];
  logic        sw_int_clk_en [NC];
  logic        sw_internal   [NC];
  logic        sw_fixj10     [NC];
  logic        int_clk_en    [NC];
  logic        status1    [NC][16][16];
  logic        status2    [NC][16][16];
  dn_sig_t     node_sig   [NC][16][16];
  dn_sig_t     node_dn    [NC][16][2];
  logic        reset_7512 [NC][16];
  up_code_t    top_up;
  always #5 clk = ~clk;

  apenext_root_sys dut (.*);

  // ------------------------------------------------------------ node model
  logic req  [NC][16][16];   // taking part in a global IF
  logic val  [NC][16][16];   // local condition
  logic got  [NC][16][16];   // result received
  logic res  [NC][16][16];   // received global condition
  int   kill_seen, trig_seen, rst_seen;

  always_comb
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < 16; b++)
        for (int n = 0; n < 16; n++)
          node_sig[c][b][n] = req[c][b][n] ? (val[c][b][n] ? N_TRUE : N_FALSE) : N_NOP;

  always @(negedge clk) begin
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < 16; b++) begin
        if (reset_7512[c][b]) rst_seen++;
        for (int n = 0; n < 16; n++) begin
          dn_sig_t d;
          d = node_dn[c][b][n / 8];
          if (req[c][b][n] && (d == N_TRUE || d == N_FALSE)) begin
            got[c][b][n] = 1'b1;
            res[c][b][n] = (d == N_TRUE);
            req[c][b][n] = 1'b0;
          end
          if (d == N_KILL) kill_seen++;
          if (d == N_TRIG) trig_seen++;
        end
      end
  end

  // ------------------------------------------------ internal observations
  int glock_supp = 0, gfilter_rej = 0;
  always @(posedge clk) begin
    if (is_cond(dut.g_crate[0].g_board[0].u_r0.g_hb[0].u_lock.d) &&
        dut.g_crate[0].g_board[0].u_r0.g_hb[0].u_lock.locked) glock_supp++;
    if (dut.g_crate[0].g_board[0].u_r0.g_hb[0].u_filt.d == D_KILL &&
        dut.g_crate[0].g_board[0].u_r0.g_hb[0].u_filt.q != D_KILL) gfilter_rej++;
  end

  // ---------------------------------------------------------- mechanisms
  typedef enum int {
    M_GLOBAL_TRUE, M_GLOBAL_FALSE, M_WAIT_ALL, M_NODE_MASK, M_KILL_STATUS,
    M_KILL_REG, M_TRIG_UP, M_ALL_UP, M_TRIG_REG, M_PARTITION, M_CLOSED_HB,
    M_RST_REG, M_RDONE, M_GLOCK, M_GFILTER, M_CABLE_MASTER, M_NUM
  } mech_e;
  int mech [M_NUM];

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  task automatic wr(input int crate, input int dev, input logic [7:0] a, input logic [63:0] v);
    cfg_crate = 4'(crate); cfg_dev = 5'(dev); cfg_addr = a; cfg_wdata = v;
    cfg_we = 1; @(negedge clk); cfg_we = 0;
  endtask

  task automatic rd(input int crate, input int dev, input logic [7:0] a, output logic [63:0] v);
    cfg_crate = 4'(crate); cfg_dev = 5'(dev); cfg_addr = a; #1; v = cfg_rdata;
  endtask

  task automatic clear_nodes();
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < 16; b++)
        for (int n = 0; n < 16; n++) begin
          req[c][b][n] = 0; val[c][b][n] = 1; got[c][b][n] = 0; res[c][b][n] = 0;
          status1[c][b][n] = 0; status2[c][b][n] = 0;
        end
  endtask

  // start a global IF on every node (all TRUE except the listed FALSE node)
  task automatic start_if(input int fc, input int fb, input int fn);
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < 16; b++)
        for (int n = 0; n < 16; n++) begin
          req[c][b][n] = 1; got[c][b][n] = 0;
          val[c][b][n] = !(c == fc && b == fb && n == fn);
        end
  endtask

  // wait until node (c,b,n) has its result; cycles counted from now
  task automatic wait_got(input int c, input int b, input int n, input int limit, output int cyc);
    cyc = 0;
    while (!got[c][b][n] && cyc < limit) begin @(negedge clk); #1; cyc++; end
  endtask

  // every node that took part has a result equal to exp
  function automatic logic all_results(input logic exp);
    for (int c = 0; c < NC; c++)
      for (int b = 0; b < 16; b++)
        for (int n = 0; n < 16; n++)
          if (!got[c][b][n] || res[c][b][n] != exp) return 1'b0;
    return 1'b1;
  endfunction

  task automatic settle();
    repeat (30) @(negedge clk);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, k0, t0;
    logic [63:0] v;
    for (int c = 0; c < NC; c++) begin
      rt_add[c] = 4'(c); sw_int_clk_en[c] = (c == 0); sw_internal[c] = (c == 0);
      sw_fixj10[c] = 0;
    end
    for (int m = 0; m < M_NUM; m++) mech[m] = 0;
    kill_seen = 0; trig_seen = 0; rst_seen = 0;
    clear_nodes();
    repeat (3) @(negedge clk);
    rst_n = 1; cfg_rst_n = 1;
    @(negedge clk);
    chk(int_clk_en[0] && !int_clk_en[1], "clock-select switch");
    rd(2, 16, 8'h00, v); chk(v[35:32] == 4'd2 && v[23:16] == 8'h01, "ROOT1 FSREG of crate 2");
    // master top level closed, connectors C4..C15 masked
    wr(0, 17, 8'h40, 64'h1_FFF0);

    // global IF, all TRUE: 4 levels up, top, 4 levels down, filter 3, lock 1
    @(negedge clk); #1;
    start_if(-1, 0, 0);
    wait_got(3, 15, 15, 100, cyc);
    chk(cyc == 13, $sformatf("global IF latency %0d, expected 13", cyc));
    repeat (2) @(negedge clk); #1;
    chk(all_results(1'b1), "global TRUE at all 1024 nodes");
    if (all_results(1'b1)) mech[M_GLOBAL_TRUE]++;
    // the lock cut the condition while the tree still carried it
    chk(glock_supp > 0, "glock suppressed the lingering condition");
    if (glock_supp > 0) mech[M_GLOCK]++;

    // back-to-back global IF with one FALSE node far away
    settle();
    start_if(3, 9, 13);
    wait_got(0, 0, 0, 100, cyc);
    repeat (2) @(negedge clk); #1;
    chk(all_results(1'b0), "global FALSE at all nodes");
    if (all_results(1'b0)) mech[M_GLOBAL_FALSE]++;

    // one node late: nobody gets a result until it sends its condition
    settle();
    start_if(-1, 0, 0);
    req[1][7][3] = 0;
    repeat (40) @(negedge clk); #1;
    chk(!got[0][0][0] && !got[3][3][3], "tree waits for every node");
    if (!got[0][0][0]) mech[M_WAIT_ALL]++;
    // mask the late node in its board's RCREG: the condition completes
    wr(1, 7, 8'h02, 64'h8_0000);
    wait_got(0, 0, 0, 100, cyc);
    chk(cyc < 100 && res[0][0][0], "masked node no longer needed");
    if (cyc < 100) mech[M_NODE_MASK]++;
    wr(1, 7, 8'h02, 64'h0);
    settle();
    clear_nodes();

    // exception on one node -> KILL at every node
    k0 = kill_seen;
    status1[2][4][6] = 1;
    repeat (20) @(negedge clk);
    status1[2][4][6] = 0;
    settle();
    chk(kill_seen - k0 >= 1024, "STATUS_1 exception kills all nodes");
    if (kill_seen - k0 >= 1024) mech[M_KILL_STATUS]++;

    // one-cycle exception glitch is removed by the stability filter
    k0 = kill_seen; t0 = gfilter_rej;
    status1[0][3][1] = 1; @(negedge clk); status1[0][3][1] = 0;
    settle();
    chk(kill_seen == k0 && gfilter_rej > t0, "one-cycle KILL filtered");
    if (kill_seen == k0 && gfilter_rej > t0) mech[M_GFILTER]++;

    // KILL from the top command register: 8 cycles at every node
    k0 = kill_seen;
    wr(0, 17, 8'h41, 64'h1);
    settle();
    chk(kill_seen - k0 == 8 * 1024, $sformatf("register KILL node-cycles %0d", kill_seen - k0));
    if (kill_seen - k0 == 8 * 1024) mech[M_KILL_REG]++;

    // I2C mode on some nodes -> TRIG; on all nodes -> ALL upward
    t0 = trig_seen;
    status2[1][2][3] = 1; status2[3][0][0] = 1;
    repeat (20) @(negedge clk); #1;
    chk(trig_seen - t0 >= 1024, "TRIG at all nodes from I2C mode");
    if (trig_seen - t0 >= 1024) mech[M_TRIG_UP]++;
    for (int c = 0; c < NC; c++) for (int b = 0; b < 16; b++) for (int n = 0; n < 16; n++)
      status2[c][b][n] = 1;
    repeat (8) @(negedge clk); #1;
    chk(top_up == C_ALL, "ALL reaches the top");
    if (top_up == C_ALL) mech[M_ALL_UP]++;
    clear_nodes();
    settle();

    // TRIG from the top command register (TRIG select = 1)
    wr(0, 17, 8'h40, 64'h3_FFF0);
    t0 = trig_seen;
    wr(0, 17, 8'h41, 64'h2);
    settle();
    chk(trig_seen - t0 == 8 * 1024, $sformatf("register TRIG node-cycles %0d", trig_seen - t0));
    if (trig_seen - t0 == 8 * 1024) mech[M_TRIG_REG]++;
    wr(0, 17, 8'h40, 64'h1_FFF0);

    // partitions: crate 2 closed and masked at the top; halfboard 1 of
    // crate 1 board 5 closed.  Each computes its own condition.
    wr(0, 17, 8'h40, 64'h1_FFF4);
    wr(2, 16, 8'h30, 64'h1_0000);
    wr(1, 5, 8'h02, 64'h2_0000_0000);
    settle();
    start_if(0, 8, 8);                          // one FALSE in crate 0
    for (int n = 8; n < 16; n++) val[1][5][n] = 0; // closed halfboard: FALSE
    wait_got(2, 0, 0, 100, cyc);
    chk(cyc == 11, $sformatf("closed crate latency %0d, expected 11", cyc));
    repeat (10) @(negedge clk); #1;
    begin
      logic ok_c2, ok_rest, ok_hb;
      ok_c2 = 1; ok_rest = 1; ok_hb = 1;
      for (int b = 0; b < 16; b++) for (int n = 0; n < 16; n++) begin
        if (!got[2][b][n] || !res[2][b][n]) ok_c2 = 0;
        if (!got[0][b][n] || res[0][b][n]) ok_rest = 0;
      end
      for (int n = 8; n < 16; n++) if (!got[1][5][n] || res[1][5][n]) ok_hb = 0;
      for (int n = 0; n < 8; n++) if (!got[1][5][n] || res[1][5][n]) ok_rest = 0;
      chk(ok_c2, "closed crate 2 gets its own TRUE");
      chk(ok_rest, "rest of the machine gets FALSE");
      chk(ok_hb, "closed halfboard gets its own FALSE");
      if (ok_c2 && ok_rest) mech[M_PARTITION]++;
      if (ok_hb) mech[M_CLOSED_HB]++;
    end
    clear_nodes();
    wr(0, 17, 8'h40, 64'h1_FFF0);
    wr(2, 16, 8'h30, 64'h0);
    wr(1, 5, 8'h02, 64'h0);
    settle();

    // master ROOT1 to ROOT2 over the cable instead of the internal bus
    sw_internal[0] = 0;
    settle();
    start_if(0, 15, 2);
    wait_got(1, 1, 1, 100, cyc);
    repeat (2) @(negedge clk); #1;
    chk(cyc == 13 && all_results(1'b0), "global IF over the master's cable");
    if (cyc == 13 && all_results(1'b0)) mech[M_CABLE_MASTER]++;
    clear_nodes();
    settle();

    // RST from the top command register reaches every board's RESET_7512
    t0 = rst_seen;
    wr(0, 17, 8'h41, 64'h4);
    settle();
    chk(rst_seen - t0 == 8 * 64, $sformatf("RESET_7512 board-cycles %0d", rst_seen - t0));
    if (rst_seen - t0 == 8 * 64) mech[M_RST_REG]++;
    rd(0, 17, 8'h41, v);
    chk(v[3], "RDONE");
    if (v[3]) mech[M_RDONE]++;

    for (int m = 0; m < M_NUM; m++) begin
      mech_e e;
      e = mech_e'(m);
      $display("mechanism %-16s happened %0d time(s)", e.name(), mech[m]);
      checks++;
      if (mech[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
