// self_test_tb: drives the TEST block with random M1/M2 outputs and checks
// the comparator, the third flip-flop D3 and the majority vote against a
// reference model.
module self_test_tb;
  logic clk = 0, rst_n = 0;
  logic nout1, nout2, ff_in1, ff_in2, q1, q2, en, load, load_val;
  logic fault, q3, maj;
  int checks = 0, failures = 0;
  logic m3;

  self_test dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0b exp %0b", what, got, exp);
    end
  endtask

  initial begin
    int ones;
    {nout1, nout2, ff_in1, ff_in2, q1, q2, en, load, load_val} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m3 = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      {nout1, nout2, ff_in1, ff_in2, q1, q2, load_val} = 7'($urandom);
      en = 1'($urandom); load = $urandom_range(0, 5) == 0;
      #1;
      check("fault", fault, (nout1 != nout2) || (ff_in1 != ff_in2));
      ones = int'(q1) + int'(q2) + int'(m3);
      check("maj", maj, ones >= 2);
      if (load) m3 = load_val; else if (en) m3 = ff_in1;
      @(posedge clk); #1;
      check("q3", q3, m3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
