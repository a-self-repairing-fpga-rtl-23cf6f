// colonizer_cell: one cell of the cellular automaton that "colonizes" the
// MUXTREE array, dividing it into blocks of BW x BH elements (one block per
// MICROTREE cell) and marking spare columns.
//
// What it does: every element holds a small automaton state (col_state_t).
// Colonization starts at the south-west corner and spreads one element per
// clock to the north and east: an element becomes valid one cycle after both
// its west and south neighbours are valid (array edges count as valid), so the
// wave reaches element (row r, column c) after r+c+1 steps, as in the
// time-step drawing of the colonizing automaton. Each element derives its
// position from its neighbours:
//   cx  position in the column pattern: gap active columns, then one spare
//       (cx == gap). gap = 0 means no spare columns.
//   bx  column inside the block, counted over active columns only; a spare
//       column carries the value its east neighbour will take.
//   by  row inside the block.
// From the position it produces the block boundaries (west boundary where
// bx = 0, south boundary where by = 0) and the element's place on the
// configuration path of its block (cfg_src): the path enters at the block's
// south-west element and runs west-to-east on even block rows and
// east-to-west on odd ones, climbing one row at the block's edge; spare
// columns are not on it and pass it through.
// The source gives the automaton's purpose, its start in one corner, that
// block size and spare frequency are part of the configuration, and that the
// boundaries guide the bitstream. The state encoding, the rules above, the
// serpentine path and taking bw/bh/gap as inputs broadcast to all cells are
// this design's own choices.
//
// Interface/timing: the state register updates on the rising clock while
// en = 1 and holds otherwise; outputs are combinational from the state.
module colonizer_cell
  import muxtree_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             w_edge,   // no west neighbour
  input  logic             s_edge,   // no south neighbour
  input  logic [POS_W-1:0] bw,       // block width, elements (>= 1)
  input  logic [POS_W-1:0] bh,       // block height, elements (>= 1)
  input  logic [POS_W-1:0] gap,      // active columns per spare column (0: none)
  input  col_state_t       w_st,
  input  col_state_t       s_st,
  output col_state_t       st,
  output logic             w_bound,
  output logic             s_bound,
  output cfg_src_e         cfg_src
);

  col_state_t nxt;

  always_comb begin
    nxt.valid = (w_edge | w_st.valid) & (s_edge | s_st.valid);
    if (w_edge || gap == '0)    nxt.cx = '0;
    else if (w_st.cx == gap)    nxt.cx = '0;
    else                        nxt.cx = w_st.cx + 1'b1;
    nxt.spare = (gap != '0) && (nxt.cx == gap);
    if (w_edge)                 nxt.bx = '0;
    else if (w_st.spare)        nxt.bx = w_st.bx;
    else if (w_st.bx == bw - 1'b1) nxt.bx = '0;
    else                        nxt.bx = w_st.bx + 1'b1;
    if (s_edge)                 nxt.by = '0;
    else if (s_st.by == bh - 1'b1) nxt.by = '0;
    else                        nxt.by = s_st.by + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  st <= '0;
    else if (en) st <= nxt;
  end

  always_comb begin
    w_bound = st.valid & ~st.spare & (st.bx == '0);
    s_bound = st.valid & (st.by == '0);
    if (!st.valid)                cfg_src = CS_NONE;
    else if (st.spare)            cfg_src = CS_PASS;
    else if (!st.by[0])           cfg_src = (st.bx != '0) ? CS_W : ((st.by == '0) ? CS_ROOT : CS_S);
    else                          cfg_src = (st.bx == bw - 1'b1) ? CS_S : CS_E;
  end

endmodule
