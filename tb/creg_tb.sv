// creg_tb: checks the configuration register's shifting (a frame entered
// LSB first lands in place after FRAME shifts), the state-bit capture, and
// its test-sequence checker: the proper sequence (FRAME ones, FRAME zeros,
// FRAME ones) leaves test_fault low, and sequences that imitate a stage
// stuck at 0 or at 1 raise it.
module creg_tb;
  import muxtree_pkg::*;
  localparam int unsigned F = FRAME;
  logic clk = 0, rst_n = 0;
  logic shift, sin, capture, state_in, test;
  logic [F-1:0] sr;
  logic sout, test_fault;
  int checks = 0, failures = 0;

  creg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [F-1:0] got, logic [F-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic run_test(logic stuck_val, logic use_stuck, logic exp_fault);
    rst_n = 0; @(negedge clk); rst_n = 1;
    test = 1;
    for (int t = 0; t < 3 * F; t++) begin
      sin = use_stuck ? stuck_val : (t < F || t >= 2 * F);
      @(negedge clk);
    end
    test = 0;
    check("test_fault", F'(test_fault), F'(exp_fault));
    @(negedge clk);
  endtask

  initial begin
    logic [F-1:0] v;
    {shift, sin, capture, state_in, test} = '0;
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      v = F'({$urandom, $urandom});
      shift = 1;
      for (int i = 0; i < F; i++) begin
        sin = v[i];
        @(negedge clk);
      end
      shift = 0;
      check("frame", sr, v);
      check("sout", F'(sout), F'(v[0]));
      state_in = ~v[0]; capture = 1;
      @(negedge clk);
      capture = 0;
      check("capture", sr, {v[F-1:1], ~v[0]});
    end
    run_test(1'b0, 1'b0, 1'b0);   // good sequence
    run_test(1'b0, 1'b1, 1'b1);   // looks like a stage stuck at 0
    run_test(1'b1, 1'b1, 1'b1);   // looks like a stage stuck at 1
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
