// muxtree_array_tb: end-to-end test of the self-repairing array at its
// default size (4 rows x 5 columns).
//
// Set-up: blocks of 2 x 2 elements and one spare column after every 3 active
// columns, so columns 0, 1, 2 and 4 are active and column 3 is spare. The
// configuration path of a block is (0,0) -> (1,0) -> (1,1) -> (0,1), so the
// bitstream carries the frames for (0,1), (1,1), (1,0), (0,0) in that order.
//
// Phases, each counted as a mechanism that must happen at least once:
//   colonize    the automaton covers the array in ROWS+COLS-1 clocks; the
//               spare map and the block boundaries are checked.
//   ctest_pass  the proper CREG test sequence leaves every creg_fault low.
//   ctest_fail  a stuck sequence raises creg_fault everywhere.
//   config      the same 4-frame bitstream configures every block.
//   repair      an injected fault is detected, repaired in FRAME+1 busy
//               clocks, and the outputs continue exactly where they were:
//               the state survives.
//   kill        a second fault in the same row segment cannot be repaired.
//   upset       a flipped flip-flop in M1 is detected one clock later and
//               repaired; the majority of the three copies restores the
//               state, so the outputs continue unchanged.
// Three configurations are run: rows of shift registers (d = WIN, east),
// columns of shift registers (d = SIN, north), and combinational elements
// (NOUT = SIN) with buses passed straight north and east.
// The first repair (row 1, column 1, spare in column 3 of 5) is the example
// of the repair drawing. A reference model of the
// logical array predicts e_out / n_out on every clock in which the array is
// not frozen by a repair.
module muxtree_array_tb;
  import muxtree_pkg::*;
  localparam int R = 4, C = 5, F = FRAME;
  localparam int NACT = 4;   // active columns per row

  logic clk = 0, rst_n = 0;
  mode_e mode = M_IDLE;
  logic [POS_W-1:0] bw, bh, gap;
  logic cfg_in, test_in;
  logic [R-1:0][C-1:0] inject, upset;
  logic [R-1:0] w_in, e_in, w_out, e_out, w_ibus, e_ibus, w_obus, e_obus;
  logic [C-1:0] s_in, n_out, s_ibus, n_ibus, s_obus, n_obus;
  logic colonized, fault_any, busy_any, kill;
  logic [R-1:0][C-1:0] spare_map, w_bound_map, s_bound_map, creg_fault_map, dead_map, shifted_map;

  int checks = 0, failures = 0;
  int n_colonize = 0, n_ctest_pass = 0, n_ctest_fail = 0, n_config = 0, n_repair = 0, n_kill = 0;
  int n_upset = 0;

  muxtree_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
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

  // state bit of the frame for block position (bx, by)
  function automatic logic init_state(int bx, int by);
    return logic'((bx + 2 * by) == 1 || (bx + 2 * by) == 2);
  endfunction

  function automatic int bx_of(int c);  // columns 0,1,2,4 -> 0,1,0,1
    return (c == 4) ? 1 : c % 2;
  endfunction

  task automatic reset_all();
    mode = M_IDLE; rst_n = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  task automatic colonize();
    int cyc = 0;
    mode = M_COLONIZE;
    while (!colonized && cyc < 100) begin @(negedge clk); cyc++; end
    mode = M_IDLE;
    check("colonize clocks", cyc, R + C - 1);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        check("spare", spare_map[r][c], c == 3);
        check("w_bound", w_bound_map[r][c], c == 0 || c == 2);
        check("s_bound", s_bound_map[r][c], r % 2 == 0);
      end
    if (colonized) n_colonize++;
  endtask

  task automatic ctest(logic good);
    mode = M_CTEST;
    for (int t = 0; t < 3 * F; t++) begin
      test_in = good ? logic'(t < F || t >= 2 * F) : 1'b0;
      @(negedge clk);
    end
    mode = M_IDLE;
    @(negedge clk);
    check("creg_fault", int'(creg_fault_map), good ? 0 : (1 << (R * C)) - 1);
    if (good && creg_fault_map == '0) n_ctest_pass++;
    if (!good && &creg_fault_map) n_ctest_fail++;
  endtask

  task automatic configure(elem_cfg_t ec);
    // chain order (0,0) (1,0) (1,1) (0,1): send the frame of (0,1) first
    int ord_bx[4] = '{0, 1, 1, 0};
    int ord_by[4] = '{1, 1, 0, 0};
    logic [F-1:0] fr;
    mode = M_CONFIG;
    for (int k = 0; k < 4; k++) begin
      fr = {ec, init_state(ord_bx[k], ord_by[k])};
      for (int i = 0; i < F; i++) begin cfg_in = fr[i]; @(negedge clk); end
    end
    mode = M_IDLE;
    n_config++;
  endtask

  // reference model: logical shift registers
  logic hreg [R][NACT];     // per row, logical columns 0..3 (physical 0,1,2,4)
  logic vreg [C][R];        // per physical column, rows 0..3

  task automatic model_init();
    int pc[NACT] = '{0, 1, 2, 4};
    for (int r = 0; r < R; r++)
      for (int l = 0; l < NACT; l++) hreg[r][l] = init_state(bx_of(pc[l]), r % 2);
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++) vreg[c][r] = (c == 3) ? 1'b0 : init_state(bx_of(c), r % 2);
  endtask

  // run n clocks of configuration kind 1 (row shift registers), 0 (column
  // shift registers) or 2 (combinational NOUT = SIN and bus pass-through);
  // a fault is injected at cycle inj_at
  task automatic run(int n, int horiz, int inj_at, int inj_r, int inj_c, bit expect_kill,
                     bit use_upset = 0);
    int busy_cnt = 0;
    bit seen_busy = 0;
    bit dead_before;
    dead_before = dead_map[inj_r][inj_c];
    mode = M_RUN;
    for (int t = 0; t < n; t++) begin
      w_in = R'($urandom); s_in = C'($urandom);
      w_ibus = R'($urandom); s_ibus = C'($urandom);
      inject = '0; upset = '0;
      if (t == inj_at) inject[inj_r][inj_c] = 1'b1;
      #1;
      if (t == inj_at) begin
        check("fault seen", fault_any, !expect_kill || 1);
      end
      // compare before the edge
      if (!busy_any && !fault_any) begin
        for (int r = 0; r < R; r++)
          if (horiz == 1) check("e_out", e_out[r], hreg[r][NACT-1]);
        for (int c = 0; c < C; c++)
          if (horiz == 0) check("n_out", n_out[c], vreg[c][R-1]);
        if (horiz == 2) begin
          for (int c = 0; c < C; c++) begin
            check("comb n_out", n_out[c], (c == 3) ? 0 : s_in[c]);
            check("bus n_obus", n_obus[c], (c == 3) ? 0 : s_ibus[c]);
          end
          for (int r = 0; r < R; r++) check("bus e_obus", e_obus[r], w_ibus[r]);
        end
      end
      if (busy_any) begin busy_cnt++; seen_busy = 1; end
      // advance model only when the array is not frozen
      if (!busy_any && !fault_any) begin
        for (int r = 0; r < R; r++) begin
          for (int l = NACT - 1; l > 0; l--) hreg[r][l] = hreg[r][l-1];
          hreg[r][0] = w_in[r];
        end
        for (int c = 0; c < C; c++) begin
          for (int r = R - 1; r > 0; r--) vreg[c][r] = vreg[c][r-1];
          vreg[c][0] = (c == 3) ? 1'b0 : s_in[c];
        end
      end
      @(negedge clk);
    end
    inject = '0; upset = '0;
    mode = M_IDLE;
    if (inj_at >= 0 && !expect_kill) begin
      check("repair busy clocks", busy_cnt, F + 1);
      check("dead after repair", dead_map[inj_r][inj_c], 1);
      if (seen_busy && !dead_before && dead_map[inj_r][inj_c]) begin
        if (use_upset) n_upset++; else n_repair++;
      end
    end
    if (expect_kill) begin
      check("kill", kill, 1);
      check("no repair on kill", busy_cnt, 0);
      if (kill) n_kill++;
    end
  endtask

  elem_cfg_t hcfg, vcfg, ccfg;

  initial begin
    bw = 2; bh = 2; gap = 3;
    cfg_in = 0; test_in = 0; inject = '0; upset = '0;
    w_in = '0; e_in = '0; s_in = '0; w_ibus = '0; e_ibus = '0; s_ibus = '0; n_ibus = '0;

    hcfg = '0;
    hcfg.in0_src = SRC_WIN; hcfg.in1_src = SRC_WIN; hcfg.sel_src = SEL_SIBUS; hcfg.out_q = 1'b1;
    vcfg = '0;
    vcfg.in0_src = SRC_SIN; vcfg.in1_src = SRC_SIN; vcfg.sel_src = SEL_SIBUS; vcfg.out_q = 1'b1;
    ccfg = vcfg;
    ccfg.out_q = 1'b0; ccfg.sb_n = SB_IN2; ccfg.sb_e = SB_IN3;   // NOBUS = SIBUS, EOBUS = WIBUS

    // a failing CREG test first
    reset_all();
    ctest(1'b0);

    // horizontal shift registers, repair in row 1 column 1, then a kill
    reset_all();
    colonize();
    ctest(1'b1);
    configure(hcfg);
    model_init();
    run(30, 1, -1, 0, 0, 0);
    run(60, 1, 5, 1, 1, 0);
    check("shifted r1c2", shifted_map[1][2], 1);
    check("shifted r1c3", shifted_map[1][3], 1);
    check("shifted r1c4", shifted_map[1][4], 0);
    run(20, 1, 3, 1, 0, 1);
    run(40, 1, 6, 2, 0, 0, 1);   // flip-flop upset: the majority keeps the state
    check("shifted r2c1", shifted_map[2][1], 1);

    // vertical shift registers, repair in row 2 column 0
    reset_all();
    colonize();
    ctest(1'b1);
    configure(vcfg);
    model_init();
    run(30, 0, -1, 0, 0, 0);
    run(60, 0, 7, 2, 0, 0);
    check("shifted r2c3", shifted_map[2][3], 1);
    run(30, 0, -1, 0, 0, 0);

    // combinational elements and bus pass-through, repair in row 3 column 2
    reset_all();
    colonize();
    ctest(1'b1);
    configure(ccfg);
    run(20, 2, -1, 0, 0, 0);
    run(60, 2, 4, 3, 2, 0);
    check("shifted r3c3", shifted_map[3][3], 1);

    $display("mechanisms: colonize=%0d ctest_pass=%0d ctest_fail=%0d config=%0d repair=%0d kill=%0d upset=%0d",
             n_colonize, n_ctest_pass, n_ctest_fail, n_config, n_repair, n_kill, n_upset);
    if (n_upset == 0) begin failures++; $display("FAIL upset repair never happened"); end
    if (n_colonize == 0) begin failures++; $display("FAIL colonize never happened"); end
    if (n_ctest_pass == 0) begin failures++; $display("FAIL ctest pass never happened"); end
    if (n_ctest_fail == 0) begin failures++; $display("FAIL ctest fail never happened"); end
    if (n_config == 0) begin failures++; $display("FAIL config never happened"); end
    if (n_repair == 0) begin failures++; $display("FAIL repair never happened"); end
    if (n_kill == 0) begin failures++; $display("FAIL kill never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
