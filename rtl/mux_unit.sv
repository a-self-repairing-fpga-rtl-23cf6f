// mux_unit: the functional part of a MUXTREE element (M1 or M2).
//
// What it does: a two-input multiplexer whose two data inputs are chosen by
// INPUT_SEL from the element's neighbour inputs, its bus wires, its own
// flip-flop or a constant, and whose select line SEL is one of four bus
// wires. The multiplexer output (FF_IN) feeds flip-flop D1; NOUT shows either
// the flip-flop (sequential element) or the multiplexer (combinational).
// This follows the M1/M2 drawing of the self-testing element: INPUT_SEL, the
// SEL multiplexer, FF D1 and the NOUT multiplexer. The encodings of the
// source fields are this design's own (see muxtree_pkg).
//
// Interface/timing: combinational from inputs to ff_in/nout; q updates on the
// rising clock when en=1. load=1 (higher priority) writes load_val into the
// flip-flop: used after configuration and after a repair shift to restore
// state. inject flips the multiplexer output and upset inverts the value the
// flip-flop stores at this clock (a state upset, such as a radiation hit):
// fault-injection inputs for testing the self-test and repair logic, tied
// low in normal use.
module mux_unit
  import muxtree_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  elem_cfg_t cfg,
  input  logic      win,
  input  logic      ein,
  input  logic      sin,
  input  logic      sibus,
  input  logic      sobus,
  input  logic      eibus,
  input  logic      eobus,
  input  logic      en,
  input  logic      load,
  input  logic      load_val,
  input  logic      inject,
  input  logic      upset,
  output logic      ff_in,
  output logic      q,
  output logic      nout
);

  logic sel, in0, in1;

  function automatic logic pick(data_src_e s, logic w, logic e, logic so,
                                logic qq, logic sb, logic eb);
    unique case (s)
      SRC_WIN:   return w;
      SRC_EIN:   return e;
      SRC_SIN:   return so;
      SRC_Q:     return qq;
      SRC_SIBUS: return sb;
      SRC_EIBUS: return eb;
      SRC_ZERO:  return 1'b0;
      default:   return 1'b1;
    endcase
  endfunction

  always_comb begin
    unique case (cfg.sel_src)
      SEL_SIBUS: sel = sibus;
      SEL_SOBUS: sel = sobus;
      SEL_EIBUS: sel = eibus;
      default:   sel = eobus;
    endcase
    in0   = pick(cfg.in0_src, win, ein, sin, q, sibus, eibus);
    in1   = pick(cfg.in1_src, win, ein, sin, q, sibus, eibus);
    ff_in = (sel ? in1 : in0) ^ inject;
    nout  = cfg.out_q ? q : ff_in;
  end

  logic q_next;

  always_comb begin
    if (load)    q_next = load_val;
    else if (en) q_next = ff_in;
    else         q_next = q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= q_next ^ upset;
  end

endmodule
