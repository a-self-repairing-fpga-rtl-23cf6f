// switch_block_tb: exhaustive over the four routing fields and random bus
// values; each output bus is compared with the source its field names.
module switch_block_tb;
  import muxtree_pkg::*;
  elem_cfg_t cfg;
  logic nout, nibus, eibus, sibus, wibus, nobus, eobus, sobus, wobus;
  int checks = 0, failures = 0;

  switch_block dut (.*);

  initial begin
    #1000000;
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
    logic [3:0] ins;   // N E S W
    for (int f = 0; f < 256; f++) begin
      for (int k = 0; k < 8; k++) begin
        cfg = elem_cfg_t'($urandom);
        {cfg.sb_n, cfg.sb_e, cfg.sb_s, cfg.sb_w} = 8'(f);
        {nout, nibus, eibus, sibus, wibus} = 5'($urandom);
        ins = {nibus, eibus, sibus, wibus};
        #1;
        // other sides in N,E,S,W order without the output's own side
        check("nobus", nobus, cfg.sb_n == SB_NOUT ? nout : (cfg.sb_n == SB_IN1 ? eibus : cfg.sb_n == SB_IN2 ? sibus : wibus));
        check("eobus", eobus, cfg.sb_e == SB_NOUT ? nout : (cfg.sb_e == SB_IN1 ? nibus : cfg.sb_e == SB_IN2 ? sibus : wibus));
        check("sobus", sobus, cfg.sb_s == SB_NOUT ? nout : (cfg.sb_s == SB_IN1 ? nibus : cfg.sb_s == SB_IN2 ? eibus : wibus));
        check("wobus", wobus, cfg.sb_w == SB_NOUT ? nout : (cfg.sb_w == SB_IN1 ? nibus : cfg.sb_w == SB_IN2 ? eibus : sibus));
        if (ins == 4'hF && nout == 1'b0) check("nonconst", nobus | eobus | sobus | wobus | (cfg.sb_n == SB_NOUT && cfg.sb_e == SB_NOUT && cfg.sb_s == SB_NOUT && cfg.sb_w == SB_NOUT), 1'b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
