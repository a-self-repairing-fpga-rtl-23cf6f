// fig1_colonize_tb: the colonization example of a 4 x 4 region of the array
// with a spare column in the third column (gap = 2). After step t of the
// automaton exactly the elements with row + column + 1 <= t are colonized,
// so the south-west element is reached at step 1 and the far corner of the
// 4 x 4 region at step 7. The spare map must mark every third column.
module fig1_colonize_tb;
  import muxtree_pkg::*;
  localparam int R = 4, C = 5;

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

  muxtree_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
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
    bw = 2; bh = 2; gap = 2;
    {cfg_in, test_in} = '0; inject = '0; upset = '0;
    {w_in, e_in, w_ibus, e_ibus} = '0; {s_in, s_ibus, n_ibus} = '0;
    @(negedge clk); @(negedge clk); rst_n = 1; @(negedge clk);
    mode = M_COLONIZE;
    for (int t = 1; t <= 8; t++) begin
      @(negedge clk);
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++)
          check($sformatf("valid(%0d,%0d) at step %0d", r, c, t), dut.st[r][c].valid, (r + c + 1) <= t);
    end
    mode = M_IDLE;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        check("spare", spare_map[r][c], c % 3 == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
