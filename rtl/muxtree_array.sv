// muxtree_array: a ROWS x COLS self-repairing MUXTREE FPGA.
//
// What it does: every position holds a MUXTREE element (muxtree_element)
// and one cell of the colonizing automaton (colonizer_cell). Operation runs
// through the modes of muxtree_pkg::mode_e, chosen by the mode input:
//   M_COLONIZE  the automaton spreads from the south-west corner. It divides
//               the array into blocks of bw x bh elements, one per MICROTREE
//               cell, and marks one spare column after every gap active
//               columns. It takes ROWS+COLS-1 clocks.
//   M_CTEST     the CREG test sequence on test_in enters every element at
//               once; creg_fault shows which CREGs failed it.
//   M_CONFIG    cfg_in feeds the entry element of every block at once, so all
//               blocks receive the same bitstream: one cell's configuration,
//               bw*bh frames of FRAME bits each.
//   M_RUN       normal operation with on-line self-test and self-repair:
//               one faulty element per row between two spare columns is
//               replaced by shifting configurations one element east.
// This is the two-level scheme of the source: colonizing automaton, element
// self-test, and the spare-column repair of the repair drawing.
//
// Interconnect: horizontal links (WIN/EOUT, EIN/WOUT, WIBUS/EOBUS,
// EIBUS/WOBUS) join physical neighbours, and dead or unused spare elements
// pass them straight through. Vertical links (SIN from the NOUT below,
// SIBUS/NIBUS from the buses below/above) join LOGICAL neighbours. An element
// at column c that has been shifted does the job of column L = c-1. Its
// neighbour in the next row is found at column L in that row, or at L+1 if
// that row's element at L is dead or shifted. So every vertical input is a
// 3:1 choice among columns c-1, c and c+1, set by the dead/shifted flags.
// This plays the role of the reroute multiplexers drawn on the four sides of
// each element; the exact selection rule is this design's own.
// The edge ports are in logical column order too: n_out[c] is the top row's
// logical column c wherever it now sits, and 0 for a spare column (unused
// spares are transparent, used ones no longer have a logical place).
//
// An FPGA fabric has combinational paths that run through many elements and
// only close into a loop for some configurations (for example EOUT -> WIN of
// the east neighbour -> its WOUT -> EIN). The tools therefore see structural
// combinational loops. They are part of what a configurable array is; a
// configuration must not close one.
//
// Timing: colonization needs ROWS+COLS-1 clocks; the CREG test needs
// 3*FRAME clocks; configuration needs bw*bh*FRAME clocks. A repair freezes
// every functional flip-flop for FRAME+2 clocks (busy); kill is sticky and
// reports a fault the spare columns could not absorb.
module muxtree_array
  import muxtree_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  mode_e                      mode,
  input  logic [POS_W-1:0]           bw,
  input  logic [POS_W-1:0]           bh,
  input  logic [POS_W-1:0]           gap,
  input  logic                       cfg_in,
  input  logic                       test_in,
  input  logic [ROWS-1:0][COLS-1:0]  inject,   // fault injection: M1 multiplexer
  input  logic [ROWS-1:0][COLS-1:0]  upset,    // fault injection: M1 flip-flop
  // edge signals
  input  logic [ROWS-1:0]            w_in,
  input  logic [ROWS-1:0]            e_in,
  input  logic [COLS-1:0]            s_in,
  output logic [ROWS-1:0]            w_out,
  output logic [ROWS-1:0]            e_out,
  output logic [COLS-1:0]            n_out,
  input  logic [ROWS-1:0]            w_ibus,
  input  logic [ROWS-1:0]            e_ibus,
  input  logic [COLS-1:0]            s_ibus,
  input  logic [COLS-1:0]            n_ibus,
  output logic [ROWS-1:0]            w_obus,
  output logic [ROWS-1:0]            e_obus,
  output logic [COLS-1:0]            s_obus,
  output logic [COLS-1:0]            n_obus,
  // status
  output logic                       colonized,
  output logic [ROWS-1:0][COLS-1:0]  spare_map,
  output logic [ROWS-1:0][COLS-1:0]  w_bound_map,
  output logic [ROWS-1:0][COLS-1:0]  s_bound_map,
  output logic [ROWS-1:0][COLS-1:0]  creg_fault_map,
  output logic [ROWS-1:0][COLS-1:0]  dead_map,
  output logic [ROWS-1:0][COLS-1:0]  shifted_map,
  output logic                       fault_any,
  output logic                       busy_any,
  output logic                       kill
);

  col_state_t st [ROWS][COLS];
  cfg_src_e   csrc [ROWS][COLS];

  logic [ROWS-1:0][COLS-1:0] wout, eout, nout, nobus, eobus, sobus, wobus;
  logic [ROWS-1:0][COLS-1:0] win, ein, sin, nibus, eibus, sibus, wibus;
  logic [ROWS-1:0][COLS-1:0] ch_e, ch_w, ch_n, ch_w_in, ch_e_in, ch_s_in;
  logic [ROWS-1:0][COLS-1:0] rep_e, rep_w_in, grant_w, grant_e_in;
  logic [ROWS-1:0][COLS-1:0] fault_det, kill_now, busy, moved;
  logic                      freeze, kill_q;

  // --- colonizing automaton ------------------------------------------------
  for (genvar r = 0; r < ROWS; r++) begin : g_col_r
    for (genvar c = 0; c < COLS; c++) begin : g_col_c
      colonizer_cell u_cc (
        .clk, .rst_n,
        .en     (mode == M_COLONIZE),
        .w_edge (c == 0),
        .s_edge (r == 0),
        .bw, .bh, .gap,
        .w_st   (st[r][(c == 0) ? 0 : c - 1]),
        .s_st   (st[(r == 0) ? 0 : r - 1][c]),
        .st     (st[r][c]),
        .w_bound(w_bound_map[r][c]),
        .s_bound(s_bound_map[r][c]),
        .cfg_src(csrc[r][c])
      );
      assign spare_map[r][c] = st[r][c].spare;
    end
  end

  always_comb begin
    colonized = 1'b1;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        colonized &= st[r][c].valid;
  end

  // --- logical-neighbour selection for vertical links ----------------------
  // Column in row rr that holds logical column l: l itself, or l+1 when the
  // element at l is dead or shifted and the one at l+1 is shifted. -1 when
  // l is a spare column that a repair has used up (no logical home).
  function automatic int holder(input logic [ROWS-1:0][COLS-1:0] mv,
                                input logic [ROWS-1:0][COLS-1:0] sh,
                                input int rr, input int l);
    if (!mv[rr][l]) return l;
    if (l < COLS - 1 && sh[rr][l+1]) return l + 1;
    return -1;
  endfunction

  // Output of the element holding logical column l in row rr (0 if none).
  function automatic logic pick(input logic [ROWS-1:0][COLS-1:0] v,
                                input logic [ROWS-1:0][COLS-1:0] mv,
                                input logic [ROWS-1:0][COLS-1:0] sh,
                                input int rr, input int l);
    int h;
    h = holder(mv, sh, rr, l);
    return (h < 0) ? 1'b0 : v[rr][h];
  endfunction

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        moved[r][c] = dead_map[r][c] | shifted_map[r][c];
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        int l;
        l = (shifted_map[r][c] && c > 0) ? c - 1 : c;
        // horizontal: physical neighbours
        win[r][c]   = (c == 0)        ? w_in[r]   : eout[r][c-1];
        wibus[r][c] = (c == 0)        ? w_ibus[r] : eobus[r][c-1];
        ein[r][c]   = (c == COLS - 1) ? e_in[r]   : wout[r][c+1];
        eibus[r][c] = (c == COLS - 1) ? e_ibus[r] : wobus[r][c+1];
        // vertical: logical neighbours
        if (r == 0) begin
          sin[r][c]   = s_in[l];
          sibus[r][c] = s_ibus[l];
        end else begin
          sin[r][c]   = pick(nout, moved, shifted_map, r - 1, l);
          sibus[r][c] = pick(nobus, moved, shifted_map, r - 1, l);
        end
        if (r == ROWS - 1) nibus[r][c] = n_ibus[l];
        else               nibus[r][c] = pick(sobus, moved, shifted_map, r + 1, l);
      end
    end
    for (int r = 0; r < ROWS; r++) begin
      w_out[r]  = wout[r][0];
      w_obus[r] = wobus[r][0];
      e_out[r]  = eout[r][COLS-1];
      e_obus[r] = eobus[r][COLS-1];
    end
    for (int c = 0; c < COLS; c++) begin
      n_out[c]  = pick(nout, moved, shifted_map, ROWS - 1, c);
      n_obus[c] = pick(nobus, moved, shifted_map, ROWS - 1, c);
      s_obus[c] = pick(sobus, moved, shifted_map, 0, c);
    end
  end

  // --- configuration chain and repair handshake ----------------------------
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        ch_w_in[r][c]    = (c == 0)        ? 1'b0 : ch_e[r][c-1];
        ch_e_in[r][c]    = (c == COLS - 1) ? 1'b0 : ch_w[r][c+1];
        ch_s_in[r][c]    = (r == 0)        ? 1'b0 : ch_n[r-1][c];
        rep_w_in[r][c]   = (c == 0)        ? 1'b0 : rep_e[r][c-1];
        grant_e_in[r][c] = (c == COLS - 1) ? 1'b0 : grant_w[r][c+1];
      end
    end
  end

  assign fault_any = |fault_det;
  assign busy_any  = |busy;
  assign freeze    = fault_any | busy_any;
  assign kill      = kill_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) kill_q <= 1'b0;
    else        kill_q <= kill_q | (|kill_now);
  end

  // --- elements ------------------------------------------------------------
  for (genvar r = 0; r < ROWS; r++) begin : g_el_r
    for (genvar c = 0; c < COLS; c++) begin : g_el_c
      muxtree_element u_el (
        .clk, .rst_n, .mode,
        .spare      (st[r][c].spare),
        .cfg_src    (csrc[r][c]),
        .win        (win[r][c]),
        .ein        (ein[r][c]),
        .sin        (sin[r][c]),
        .nibus      (nibus[r][c]),
        .eibus      (eibus[r][c]),
        .sibus      (sibus[r][c]),
        .wibus      (wibus[r][c]),
        .wout       (wout[r][c]),
        .eout       (eout[r][c]),
        .nout       (nout[r][c]),
        .nobus      (nobus[r][c]),
        .eobus      (eobus[r][c]),
        .sobus      (sobus[r][c]),
        .wobus      (wobus[r][c]),
        .cfg_root   (cfg_in),
        .chain_w_in (ch_w_in[r][c]),
        .chain_e_in (ch_e_in[r][c]),
        .chain_s_in (ch_s_in[r][c]),
        .chain_e_out(ch_e[r][c]),
        .chain_w_out(ch_w[r][c]),
        .chain_n_out(ch_n[r][c]),
        .test_in,
        .rep_w_in   (rep_w_in[r][c]),
        .rep_e_out  (rep_e[r][c]),
        .grant_e_in (grant_e_in[r][c]),
        .grant_w_out(grant_w[r][c]),
        .freeze,
        .busy_any,
        .fault_det  (fault_det[r][c]),
        .kill       (kill_now[r][c]),
        .busy       (busy[r][c]),
        .dead       (dead_map[r][c]),
        .shifted    (shifted_map[r][c]),
        .creg_fault (creg_fault_map[r][c]),
        .inject     (inject[r][c]),
        .upset      (upset[r][c])
      );
    end
  end

endmodule
