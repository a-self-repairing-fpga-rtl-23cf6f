// muxtree_pkg: types and constants shared by the MUXTREE self-repairing FPGA.
//
// A MUXTREE element is configured by a 17-bit word (elem_cfg_t). Its
// configuration register (CREG) holds one frame: that word plus one state bit,
// the value of the element's flip-flop. The state bit is what lets a repair
// move an element's configuration AND its state one position east.
// The field layout and the encodings below are this design's own choice; the
// source description only says that the element selects its multiplexer inputs
// (INPUT_SEL), its select line (SEL), whether NOUT shows the flip-flop or the
// multiplexer, and how the switch block (SB) routes the buses.
package muxtree_pkg;

  // Multiplexer data input sources (in0_src / in1_src).
  typedef enum logic [2:0] {
    SRC_WIN   = 3'd0,
    SRC_EIN   = 3'd1,
    SRC_SIN   = 3'd2,
    SRC_Q     = 3'd3,  // own flip-flop (feedback)
    SRC_SIBUS = 3'd4,
    SRC_EIBUS = 3'd5,
    SRC_ZERO  = 3'd6,
    SRC_ONE   = 3'd7
  } data_src_e;

  // Select-line sources (the four bus wires drawn entering M1/M2).
  typedef enum logic [1:0] {
    SEL_SIBUS = 2'd0,
    SEL_SOBUS = 2'd1,
    SEL_EIBUS = 2'd2,
    SEL_EOBUS = 2'd3
  } sel_src_e;

  // Switch-block output source. For each output bus: 0 = this element's NOUT,
  // 1..3 = the input buses of the three other sides, taken in the order
  // N, E, S, W with the output's own side skipped.
  typedef enum logic [1:0] {
    SB_NOUT = 2'd0,
    SB_IN1  = 2'd1,
    SB_IN2  = 2'd2,
    SB_IN3  = 2'd3
  } sb_src_e;

  typedef struct packed {
    sb_src_e   sb_n;     // NOBUS source
    sb_src_e   sb_e;     // EOBUS source
    sb_src_e   sb_s;     // SOBUS source
    sb_src_e   sb_w;     // WOBUS source
    logic      out_q;    // 1: NOUT = flip-flop Q, 0: NOUT = multiplexer output
    sel_src_e  sel_src;  // multiplexer select line
    data_src_e in1_src;  // data input taken when select = 1
    data_src_e in0_src;  // data input taken when select = 0
  } elem_cfg_t;

  localparam int unsigned CFG_BITS = $bits(elem_cfg_t);  // 17
  localparam int unsigned FRAME    = CFG_BITS + 1;       // CREG length: config + state bit

  // Global operating mode of the array.
  typedef enum logic [2:0] {
    M_IDLE     = 3'd0,
    M_COLONIZE = 3'd1,  // cellular automaton grows the block boundaries
    M_CTEST    = 3'd2,  // CREG test sequence, all elements in parallel
    M_CONFIG   = 3'd3,  // bitstream shifts along the block paths
    M_RUN      = 3'd4   // normal operation, on-line self-test and repair
  } mode_e;

  // Where an element's CREG takes its serial input from during M_CONFIG.
  typedef enum logic [2:0] {
    CS_NONE = 3'd0,   // outside every colonized block
    CS_ROOT = 3'd1,   // block entry: the global configuration input
    CS_W    = 3'd2,   // west neighbour
    CS_E    = 3'd3,   // east neighbour
    CS_S    = 3'd4,   // south neighbour
    CS_PASS = 3'd5    // spare column: not in the path, passes it through
  } cfg_src_e;

  // Width of the automaton's position counters.
  localparam int unsigned POS_W = 4;

  // State of one colonizer (cellular automaton) cell.
  typedef struct packed {
    logic             valid;  // the colonizing wave has reached this element
    logic             spare;  // element lies in a spare column
    logic [POS_W-1:0] cx;     // position in the active/spare column pattern
    logic [POS_W-1:0] bx;     // column within its block (spares carry the next one)
    logic [POS_W-1:0] by;     // row within its block
  } col_state_t;

endpackage
