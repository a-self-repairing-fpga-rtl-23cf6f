// muxtree_element: one self-testing, self-repairing MUXTREE element.
//
// What it does: the element is a single configurable two-input multiplexer
// with a flip-flop, built twice (M1, M2) and checked by the TEST block
// (comparator, third flip-flop D3, majority). Its configuration lives in the
// CREG shift register, and the switch block SB routes the buses. This is
// the structure of the self-testing element drawing. Outputs: NOUT
// (north, from M1), WOUT (west, M1's NOUT) and EOUT (east, M2's NOUT).
//
// Configuration (mode M_CONFIG): the CREG shifts one bit per clock from the
// neighbour that cfg_src names, following the path the colonizer laid out
// through the block. An element of a spare column is not on the path and
// passes the chain through in both directions. Outside M_RUN the flip-flops
// follow the frame's state bit, so each element starts from the state
// written in its frame.
// CREG test (mode M_CTEST): the test sequence on test_in enters every CREG in
// parallel and the CREG's own checker flags a stuck stage (creg_fault). A
// faulty CREG is reported only; it is not repaired.
//
// Repair (mode M_RUN): when COMP sees M1 and M2 disagree (fault_det), the
// element asks for a repair. The request (rep_e_out) runs combinationally
// east along the row up to the next spare column. The grant (grant_w_out)
// runs west from that spare column and is 1 only while the spare is still
// unused. That gives one repair per row between two spare columns, as the
// source prescribes. Without a grant the element raises kill: the MUXTREE
// level can do no more.
// With a grant, every element from the faulty one to the spare:
//   1. captures its majority-voted flip-flop value into the CREG state bit;
//   2. shifts its CREG FRAME times to the east over the configuration links,
//      so each frame, configuration and state, moves one element right;
//   3. reloads its flip-flops from the state bit it received.
// The faulty element then becomes dead. The others, the spare included,
// become shifted: each now does the job of its west neighbour. A dead
// element, and an unused spare, is transparent: WIN goes straight to EOUT,
// EIN to WOUT, WIBUS to EOBUS and EIBUS to WOBUS.
// The request/grant handshake, the 3-phase sequence and the "freeze" input
// are this design's own; the source gives the shift to the right of the
// CREG, the majority result attached to it and the use of the configuration
// links.
//
// The functional part works from the CREG contents only in M_RUN, outside a
// repair shift and while the element holds a logical element; otherwise it
// sees the all-zero configuration (this design's choice), so
// a half-loaded configuration cannot close a combinational loop. The internal
// path NOUT -> SB -> SOBUS/EOBUS -> SEL can form a loop if a configuration
// selects it; avoiding that is up to the configuration, as in any FPGA.
//
// Fault injection for testing: inject flips M1's multiplexer output (seen by
// COMP in the same clock); upset inverts the value M1's flip-flop stores (seen
// one clock later through NOUT when NOUT shows the flip-flop). Both are tied
// low in normal use.
//
// Timing: a repair takes 1 + FRAME + 1 clocks (capture, shift, reload). The
// global freeze input (any fault_det this cycle, or any element busy) stops
// every functional flip-flop meanwhile, so the faulty value is never stored
// and the array resumes from the voted state.
module muxtree_element
  import muxtree_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  mode_e     mode,
  input  logic      spare,        // from the colonizer: element is in a spare column
  input  cfg_src_e  cfg_src,      // from the colonizer: configuration path
  // functional connections
  input  logic      win,
  input  logic      ein,
  input  logic      sin,
  input  logic      nibus,
  input  logic      eibus,
  input  logic      sibus,
  input  logic      wibus,
  output logic      wout,
  output logic      eout,
  output logic      nout,
  output logic      nobus,
  output logic      eobus,
  output logic      sobus,
  output logic      wobus,
  // configuration chain
  input  logic      cfg_root,
  input  logic      chain_w_in,   // west neighbour's chain_e_out
  input  logic      chain_e_in,   // east neighbour's chain_w_out
  input  logic      chain_s_in,   // south neighbour's chain_n_out
  output logic      chain_e_out,
  output logic      chain_w_out,
  output logic      chain_n_out,
  input  logic      test_in,
  // repair
  input  logic      rep_w_in,
  output logic      rep_e_out,
  input  logic      grant_e_in,
  output logic      grant_w_out,
  input  logic      freeze,
  input  logic      busy_any,
  output logic      fault_det,
  output logic      kill,
  output logic      busy,
  output logic      dead,
  output logic      shifted,
  output logic      creg_fault,
  // fault injection, tie low in normal use: inject flips M1's multiplexer
  // output, upset inverts the value M1's flip-flop stores at this clock
  input  logic      inject,
  input  logic      upset
);

  typedef enum logic [1:0] {R_IDLE, R_SHIFT, R_LOAD} rep_state_e;

  localparam int unsigned CNT_W = $clog2(FRAME);

  rep_state_e       rep_q;
  logic [CNT_W-1:0] cnt;
  logic             from_w;

  logic [FRAME-1:0] sr;
  logic             sout;
  elem_cfg_t        cfg;

  logic run, unused_spare, holds, transparent, pass, grant_here, start;
  logic cmp_fault, maj, q1, q2, q3, ff1, ff2, n1, n2;
  logic sb_n, sb_e, sb_s, sb_w;
  logic ff_en, ff_load, ff_val, creg_shift, creg_sin, creg_capture;

  // Outside M_RUN, during a repair shift and when not holding a logical
  // element, the functional part sees the all-zero configuration, which
  // closes no combinational loop whatever passes through the CREG.
  assign cfg = (mode == M_RUN && rep_q == R_IDLE && holds) ? elem_cfg_t'(sr[FRAME-1:1]) : '0;

  always_comb begin
    run          = (mode == M_RUN);
    unused_spare = spare & ~shifted & ~dead;
    holds        = ~dead & ~unused_spare;
    transparent  = ~holds;
    pass         = (mode == M_CONFIG) && (cfg_src == CS_PASS);
    fault_det    = run & holds & cmp_fault & ~busy_any;
    grant_here   = spare ? unused_spare : grant_e_in;
    grant_w_out  = grant_here;
    start        = run & ~busy_any & (rep_q == R_IDLE) & (fault_det | rep_w_in) & grant_here;
    rep_e_out    = start & ~spare;
    kill         = fault_det & ~grant_here;
  end

  assign busy = (rep_q != R_IDLE);

  // CREG control
  always_comb begin
    creg_shift   = 1'b0;
    creg_sin     = 1'b0;
    creg_capture = 1'b0;
    if (mode == M_CTEST) begin
      creg_sin = test_in;
    end else if (mode == M_CONFIG) begin
      unique case (cfg_src)
        CS_ROOT: begin creg_shift = 1'b1; creg_sin = cfg_root;   end
        CS_W:    begin creg_shift = 1'b1; creg_sin = chain_w_in; end
        CS_E:    begin creg_shift = 1'b1; creg_sin = chain_e_in; end
        CS_S:    begin creg_shift = 1'b1; creg_sin = chain_s_in; end
        default: ;
      endcase
    end else if (rep_q == R_SHIFT) begin
      creg_shift = 1'b1;
      creg_sin   = from_w & chain_w_in;
    end else if (start) begin
      creg_capture = 1'b1;
    end
    ff_load = (mode != M_RUN) || (rep_q == R_LOAD);
    ff_en   = run & ~freeze;
    // the value sr[0] will hold after this clock
    ff_val  = creg_shift ? sr[1] : sr[0];
  end

  creg #(.FRAME(FRAME)) u_creg (
    .clk, .rst_n,
    .shift(creg_shift), .sin(creg_sin),
    .capture(creg_capture), .state_in(maj),
    .test(mode == M_CTEST),
    .sr, .sout, .test_fault(creg_fault)
  );

  mux_unit u_m1 (
    .clk, .rst_n, .cfg,
    .win, .ein, .sin, .sibus, .sobus(sb_s), .eibus, .eobus(sb_e),
    .en(ff_en), .load(ff_load), .load_val(ff_val), .inject, .upset,
    .ff_in(ff1), .q(q1), .nout(n1)
  );

  mux_unit u_m2 (
    .clk, .rst_n, .cfg,
    .win, .ein, .sin, .sibus, .sobus(sb_s), .eibus, .eobus(sb_e),
    .en(ff_en), .load(ff_load), .load_val(ff_val), .inject(1'b0), .upset(1'b0),
    .ff_in(ff2), .q(q2), .nout(n2)
  );

  self_test u_test (
    .clk, .rst_n,
    .nout1(n1), .nout2(n2), .ff_in1(ff1), .ff_in2(ff2), .q1, .q2,
    .en(ff_en), .load(ff_load), .load_val(ff_val),
    .fault(cmp_fault), .q3, .maj
  );

  switch_block u_sb (
    .cfg, .nout(n1),
    .nibus, .eibus, .sibus, .wibus,
    .nobus(sb_n), .eobus(sb_e), .sobus(sb_s), .wobus(sb_w)
  );

  // Outputs: transparent when dead or an unused spare.
  always_comb begin
    nout  = transparent ? 1'b0  : n1;
    wout  = transparent ? ein   : n1;
    eout  = transparent ? win   : n2;
    nobus = transparent ? 1'b0  : sb_n;
    sobus = transparent ? 1'b0  : sb_s;
    eobus = transparent ? wibus : sb_e;
    wobus = transparent ? eibus : sb_w;
    chain_e_out = pass ? chain_w_in : sout;
    chain_w_out = pass ? chain_e_in : sout;
    chain_n_out = sout;
  end

  // Repair sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rep_q   <= R_IDLE;
      cnt     <= '0;
      from_w  <= 1'b0;
      dead    <= 1'b0;
      shifted <= 1'b0;
    end else begin
      unique case (rep_q)
        R_IDLE: if (start) begin
          rep_q  <= R_SHIFT;
          cnt    <= '0;
          from_w <= rep_w_in;
        end
        R_SHIFT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(FRAME - 1)) rep_q <= R_LOAD;
        end
        default: begin
          rep_q <= R_IDLE;
          if (from_w) shifted <= 1'b1;
          else        dead    <= 1'b1;
        end
      endcase
    end
  end

endmodule
