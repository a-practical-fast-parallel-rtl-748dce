// dpr_pkg: types and constants shared by the distributed pipeline routing
// (DPR) architecture for symmetric three-stage Clos networks C(n, m, n).
//
// The router moves "request tokens" around rings of processing elements.
// A connection addition request (CAR) token is the triple (p, j, c): the
// originating input p inside its input group, the destination output group
// j and, once routed, the colour c (the middle-stage module the connection
// uses). A connection deletion request (CDR) token has the same fields plus a
// marker bit and carries the colour of the connection it removes.
//
// Field widths are fixed here so that one token type serves every size:
// 8-bit indices cover n up to 256 (N = n*n = 65,536 ports, the largest
// switch size the architecture is aimed at) and 9-bit colours cover m up to
// 512 (enough for m = 2n - 1 at n = 256). Modules check their own n and m
// against these limits.
package dpr_pkg;

  localparam int unsigned IDX_W = 8;   // width of p and j fields
  localparam int unsigned COL_W = 9;   // width of the colour field
  localparam int unsigned MAX_N = 1 << IDX_W;
  localparam int unsigned MAX_M = 1 << COL_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [COL_W-1:0] color_t;

  // One request token.  `del` distinguishes CDR (1) from CAR (0) tokens;
  // `colored` marks a CAR token whose colour field has been filled.
  typedef struct packed {
    logic   valid;
    logic   del;
    idx_t   src;      // p: input inside the group that issued the token
    idx_t   grp;      // j: output group (the agent PE index in the ring)
    logic   colored;
    color_t color;    // c: middle-stage module
  } token_t;

  localparam token_t TOKEN_NONE = '0;

  // A request presented by one input for the next routing cycle.
  typedef struct packed {
    logic   add;        // establish a connection to output group add_grp
    idx_t   add_grp;
    logic   del;        // tear down the connection (del_grp, del_color)
    idx_t   del_grp;
    color_t del_color;
  } req_t;

  // Phases of one routing cycle of HARD-COLORING.  PREP and RESULT are
  // single bookkeeping cycles of this implementation around the phases.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_PREP   = 3'd1,   // tokens are formed from the inputs' requests
    PH_DIST   = 3'd2,   // Phase 1: distribution to the agent PEs
    PH_ERASE  = 3'd3,   // Phase 2.1: colour erase (CDR tokens)
    PH_ASSIGN = 3'd4,   // Phase 2 / 2.2: colour assignment (CAR tokens)
    PH_RETURN = 3'd5,   // Phase 3: redistribution to the originating PEs
    PH_RESULT = 3'd6    // routed tokens are presented to the inputs
  } phase_e;

  // (a + b) mod m for small non-negative operands, used for initial values.
  function automatic int unsigned mod_add(int unsigned a, int unsigned b, int unsigned m);
    return (a + b) % m;
  endfunction

endpackage
