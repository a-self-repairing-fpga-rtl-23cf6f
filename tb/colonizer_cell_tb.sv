// colonizer_cell_tb: drives one automaton cell with random neighbour
// states, block sizes and spare spacing, and checks its next state,
// boundaries and configuration-path source against a reference model of
// the rules; also checks that the state holds while en is low.
module colonizer_cell_tb;
  import muxtree_pkg::*;
  logic clk = 0, rst_n = 0, en, w_edge, s_edge;
  logic [POS_W-1:0] bw, bh, gap;
  col_state_t w_st, s_st, st, exp_st;
  logic w_bound, s_bound;
  cfg_src_e cfg_src, exp_src;
  int checks = 0, failures = 0;

  colonizer_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int cx, bx, by;
    {en, w_edge, s_edge} = '0; bw = 1; bh = 1; gap = 0; w_st = '0; s_st = '0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      bw = POS_W'($urandom_range(1, 6)); bh = POS_W'($urandom_range(1, 6));
      gap = POS_W'($urandom_range(0, 5));
      w_edge = $urandom_range(0, 3) == 0; s_edge = $urandom_range(0, 3) == 0;
      w_st.valid = 1'($urandom); s_st.valid = 1'($urandom);
      w_st.cx = POS_W'($urandom_range(0, gap)); w_st.spare = (gap != 0) && (w_st.cx == gap);
      w_st.bx = POS_W'($urandom_range(0, bw - 1)); w_st.by = POS_W'($urandom_range(0, bh - 1));
      s_st.cx = POS_W'($urandom_range(0, 5)); s_st.spare = 1'($urandom);
      s_st.bx = POS_W'($urandom_range(0, 5)); s_st.by = POS_W'($urandom_range(0, bh - 1));
      // reference
      cx = (w_edge || gap == 0) ? 0 : (int'(w_st.cx) == int'(gap) ? 0 : int'(w_st.cx) + 1);
      exp_st.cx = POS_W'(cx);
      exp_st.spare = (gap != 0) && (cx == int'(gap));
      bx = w_edge ? 0 : (w_st.spare ? int'(w_st.bx) : (int'(w_st.bx) + 1) % int'(bw));
      by = s_edge ? 0 : (int'(s_st.by) + 1) % int'(bh);
      exp_st.bx = POS_W'(bx); exp_st.by = POS_W'(by);
      exp_st.valid = (w_edge || w_st.valid) && (s_edge || s_st.valid);
      en = 1;
      @(negedge clk);
      check("valid", st.valid, exp_st.valid);
      check("cx", st.cx, exp_st.cx);
      check("spare", st.spare, exp_st.spare);
      check("bx", st.bx, exp_st.bx);
      check("by", st.by, exp_st.by);
      check("w_bound", w_bound, exp_st.valid && !exp_st.spare && bx == 0);
      check("s_bound", s_bound, exp_st.valid && by == 0);
      if (!exp_st.valid) exp_src = CS_NONE;
      else if (exp_st.spare) exp_src = CS_PASS;
      else if (by % 2 == 0) exp_src = (bx > 0) ? CS_W : (by == 0 ? CS_ROOT : CS_S);
      else exp_src = (bx == int'(bw) - 1) ? CS_S : CS_E;
      check("cfg_src", int'(cfg_src), int'(exp_src));
      // hold when disabled
      en = 0; w_st = ~w_st; s_st = ~s_st;
      @(negedge clk);
      check("hold", int'(st), int'(exp_st));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
