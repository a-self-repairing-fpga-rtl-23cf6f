// switch_block: the bus switch block (SB) of a MUXTREE element.
//
// What it does: drives each of the four output buses (NOBUS, EOBUS, SOBUS,
// WOBUS) from the element's NOUT or from the input bus of one of the three
// other sides. The source description names the SB and draws its eight bus
// terminals and the NOUT connection; the routing options and their encoding
// (sb_src_e in muxtree_pkg: 0 = NOUT, 1..3 = the other sides in N, E, S, W
// order) are this design's choice.
//
// Interface/timing: purely combinational. In the array every bus output
// feeds a neighbour's bus input, so the tools see structural combinational
// loops through this block; a configuration that actually closes one (a bus
// routed back to the side it came from) is an invalid configuration, as in
// any FPGA.
module switch_block
  import muxtree_pkg::*;
(
  input  elem_cfg_t cfg,
  input  logic      nout,
  input  logic      nibus,
  input  logic      eibus,
  input  logic      sibus,
  input  logic      wibus,
  output logic      nobus,
  output logic      eobus,
  output logic      sobus,
  output logic      wobus
);

  function automatic logic route(sb_src_e s, logic n, logic a, logic b, logic c);
    unique case (s)
      SB_NOUT: return n;
      SB_IN1:  return a;
      SB_IN2:  return b;
      default: return c;
    endcase
  endfunction

  always_comb begin
    nobus = route(cfg.sb_n, nout, eibus, sibus, wibus);
    eobus = route(cfg.sb_e, nout, nibus, sibus, wibus);
    sobus = route(cfg.sb_s, nout, nibus, eibus, wibus);
    wobus = route(cfg.sb_w, nout, nibus, eibus, sibus);
  end

endmodule
