// mt_pkg: shared constants and types of the self-repairing MUXTREE array.
//
// The configuration register (CREG) of a MUXTREE element is 20 bits wide.
// Its field layout follows the register drawing of the element:
//   [19]    unused (0)    [18:16] LEFT   input select of the left 8:1 mux
//   [15]    unused (0)    [14:12] RIGHT  input select of the right 8:1 mux
//   [11:10] N  NOBUS select   [9:8] S  SOBUS select
//   [7:6]   E  EOBUS select   [5:4] W  WOBUS select
//   [3]     unused (0)    [2] P  preset value of flip-flop F
//   [1]     R  NOUT taken from F (1) or from the decision mux (0)
//   [0]     EB decision-mux control taken from EIBUS (1) or EOBUS (0)
// The serial configuration chain of an element is one stage longer than
// CREG: the three copies of flip-flop F form its first stage.
package mt_pkg;

  localparam int unsigned CREG_W  = 20;
  localparam int unsigned CHAIN_W = CREG_W + 1;

  localparam int unsigned LEFT_LSB  = 16;
  localparam int unsigned RIGHT_LSB = 12;
  localparam int unsigned N_LSB     = 10;
  localparam int unsigned S_LSB     = 8;
  localparam int unsigned E_LSB     = 6;
  localparam int unsigned W_LSB     = 4;
  localparam int unsigned P_BIT     = 2;
  localparam int unsigned R_BIT     = 1;
  localparam int unsigned EB_BIT    = 0;

  typedef logic [CREG_W-1:0] creg_t;

  // Array operating modes, driven from outside the array.
  typedef enum logic [1:0] {
    MODE_RUN      = 2'd0,  // normal operation, on-line self-test active
    MODE_COLONIZE = 2'd1,  // automaton consumes the colonization stream
    MODE_TEST     = 2'd2,  // CREG test pattern broadcast to all elements
    MODE_CONFIG   = 2'd3   // configuration streams shifted along the rows
  } mode_t;

  // Symbols of the colonization stream (one per clock).
  typedef enum logic [1:0] {
    SYM_NONE     = 2'd0,   // no symbol this cycle
    SYM_INTERIOR = 2'd1,   // ordinary column/row inside a cell
    SYM_BOUNDARY = 2'd2,   // first column/row of a new cell
    SYM_SPARE    = 2'd3    // spare column (pale state)
  } sym_t;

  // Pack a configuration word from its fields.
  function automatic creg_t creg_pack(input logic [2:0] left, input logic [2:0] right,
                                      input logic [1:0] n, input logic [1:0] s,
                                      input logic [1:0] e, input logic [1:0] w,
                                      input logic p, input logic r, input logic eb);
    creg_t c;
    c = '0;
    c[LEFT_LSB +: 3]  = left;
    c[RIGHT_LSB +: 3] = right;
    c[N_LSB +: 2]     = n;
    c[S_LSB +: 2]     = s;
    c[E_LSB +: 2]     = e;
    c[W_LSB +: 2]     = w;
    c[P_BIT]          = p;
    c[R_BIT]          = r;
    c[EB_BIT]         = eb;
    return c;
  endfunction

endpackage
