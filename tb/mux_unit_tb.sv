// mux_unit_tb: random configurations and inputs for one functional part
// (M1/M2). A reference model written from the field definitions predicts
// FF_IN, NOUT and the flip-flop after each clock; load and fault injection
// and both fault-injection inputs are exercised too.
module mux_unit_tb;
  import muxtree_pkg::*;

  logic clk = 0, rst_n = 0;
  elem_cfg_t cfg;
  logic win, ein, sin, sibus, sobus, eibus, eobus, en, load, load_val, inject, upset;
  logic ff_in, q, nout;
  int checks = 0, failures = 0;
  logic mq;

  mux_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic src(int s, logic qq);
    logic [7:0] v;
    v = {1'b1, 1'b0, eibus, sibus, qq, sin, ein, win};
    return v[s];
  endfunction

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %0b exp %0b cfg=%h", what, got, exp, cfg);
    end
  endtask

  initial begin
    logic s, d;
    logic [3:0] sv;
    cfg = '0; {win, ein, sin, sibus, sobus, eibus, eobus, en, load, load_val, inject, upset} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mq = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cfg = elem_cfg_t'($urandom);
      {win, ein, sin, sibus, sobus, eibus, eobus} = 7'($urandom);
      en = $urandom_range(0, 3) != 0;
      load = $urandom_range(0, 7) == 0;
      load_val = 1'($urandom);
      inject = $urandom_range(0, 7) == 0;
      upset = $urandom_range(0, 7) == 0;
      #1;
      sv = {eobus, eibus, sobus, sibus};
      s = sv[cfg.sel_src];
      d = (s ? src(int'(cfg.in1_src), mq) : src(int'(cfg.in0_src), mq)) ^ inject;
      check("ff_in", ff_in, d);
      check("nout", nout, cfg.out_q ? mq : d);
      if (load) mq = load_val; else if (en) mq = d;
      mq ^= upset;
      @(posedge clk); #1;
      check("q", q, mq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
