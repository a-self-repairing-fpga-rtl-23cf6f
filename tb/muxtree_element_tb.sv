// muxtree_element_tb: one element on its own.
//  - CREG test: the proper sequence leaves creg_fault low.
//  - configuration from the root input; the flip-flop starts from the
//    frame's state bit; a shift-register configuration then follows WIN.
//  - a spare element passes the configuration chain through.
//  - fault injection: fault_det rises, a repair starts with a grant, takes
//    FRAME+2 busy cycles, and leaves the element dead and transparent.
//  - a repair requested from the west shifts a frame in and reloads the
//    flip-flop from its state bit (element becomes shifted).
//  - a fault without a grant raises kill.
module muxtree_element_tb;
  import muxtree_pkg::*;
  localparam int unsigned F = FRAME;

  logic clk = 0, rst_n = 0;
  mode_e mode = M_IDLE;
  logic spare;
  cfg_src_e cfg_src;
  logic win, ein, sin, nibus, eibus, sibus, wibus;
  logic wout, eout, nout, nobus, eobus, sobus, wobus;
  logic cfg_root, chain_w_in, chain_e_in, chain_s_in, chain_e_out, chain_w_out, chain_n_out;
  logic test_in, rep_w_in, rep_e_out, grant_e_in, grant_w_out, freeze, busy_any;
  logic fault_det, kill, busy, dead, shifted, creg_fault, inject, upset;
  int checks = 0, failures = 0;

  muxtree_element dut (.*);

  always #5 clk = ~clk;
  // the element is alone: the global signals come from it
  assign busy_any = busy;
  assign freeze   = fault_det | busy;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  function automatic logic [F-1:0] frame(elem_cfg_t c, logic st);
    return {c, st};
  endfunction

  task automatic load_frame(logic [F-1:0] f);
    mode = M_CONFIG; cfg_src = CS_ROOT;
    for (int i = 0; i < F; i++) begin cfg_root = f[i]; @(negedge clk); end
    mode = M_IDLE;
  endtask

  elem_cfg_t shreg;
  int cyc;

  initial begin
    logic [F-1:0] f2;
    mode = M_IDLE; spare = 0; cfg_src = CS_NONE;
    {win, ein, sin, nibus, eibus, sibus, wibus} = '0;
    {cfg_root, chain_w_in, chain_e_in, chain_s_in, test_in, rep_w_in, inject, upset} = '0;
    grant_e_in = 1;
    @(negedge clk); rst_n = 1;

    // CREG test sequence
    mode = M_CTEST;
    for (int t = 0; t < 3 * F; t++) begin test_in = (t < F || t >= 2 * F); @(negedge clk); end
    mode = M_IDLE; @(negedge clk);
    check("creg_fault", creg_fault, 0);

    // shift register: d = WIN, NOUT = Q, EOBUS = NOUT
    shreg = '0;
    shreg.in0_src = SRC_WIN; shreg.in1_src = SRC_WIN; shreg.sel_src = SEL_SIBUS;
    shreg.out_q = 1; shreg.sb_e = SB_NOUT; shreg.sb_n = SB_IN3; // NOBUS = WIBUS
    load_frame(frame(shreg, 1'b1));
    mode = M_RUN; #1;
    check("init state", nout, 1);
    for (int i = 0; i < 40; i++) begin
      logic b, prev;
      b = 1'($urandom); prev = nout;
      win = b; wibus = ~b; #1;
      check("eobus=nout", eobus, nout);
      check("nobus=wibus", nobus, int'(!b));
      check("no fault", fault_det, 0);
      @(negedge clk);
      check("q<=win", nout, b);
      check("eout", eout, b);
    end

    // fault: repair with grant, element alone => it becomes dead
    inject = 1; #1;
    check("fault_det", fault_det, 1);
    check("rep_e_out", rep_e_out, 1);
    check("kill", kill, 0);
    @(negedge clk);
    cyc = 0;
    while (busy && cyc < 100) begin @(negedge clk); cyc++; end
    check("repair cycles", cyc, F + 1);
    check("dead", dead, 1);
    inject = 0;
    win = 1; ein = 0; wibus = 0; eibus = 1; #1;
    check("bypass eout", eout, 1);
    check("bypass wout", wout, 0);
    check("bypass eobus", eobus, 0);
    check("bypass wobus", wobus, 1);
    check("dead nout", nout, 0);
    inject = 1; #1;
    check("dead no fault", fault_det, 0);
    inject = 0;

    // shifted-in repair: a frame arrives from the west
    rst_n = 0; @(negedge clk); rst_n = 1;
    load_frame(frame(shreg, 1'b0));
    mode = M_RUN;
    f2 = frame(shreg, 1'b1);
    rep_w_in = 1; #1;
    check("start from west", rep_e_out, 1);
    @(negedge clk);
    rep_w_in = 0;
    for (int i = 0; i < F; i++) begin chain_w_in = f2[i]; @(negedge clk); end
    @(negedge clk);
    check("shifted", shifted, 1);
    check("dead2", dead, 0);
    check("state restored", nout, 1);

    // spare column: passes the configuration chain through
    rst_n = 0; @(negedge clk); rst_n = 1;
    mode = M_CONFIG; cfg_src = CS_PASS; spare = 1;
    chain_w_in = 1; chain_e_in = 0; #1;
    check("pass e", chain_e_out, 1);
    check("pass w", chain_w_out, 0);
    chain_w_in = 0; chain_e_in = 1; #1;
    check("pass e0", chain_e_out, 0);
    check("pass w1", chain_w_out, 1);
    mode = M_RUN; win = 1; #1;
    check("unused spare transparent", eout, 1);

    // fault with no grant -> kill
    rst_n = 0; spare = 0; @(negedge clk); rst_n = 1;
    load_frame(frame(shreg, 1'b0));
    mode = M_RUN; grant_e_in = 0; inject = 1; #1;
    check("kill", kill, 1);
    check("no start", rep_e_out, 0);
    @(negedge clk);
    check("not busy", busy, 0);
    inject = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
