// flash_pkg: shared types for the Flash hardware compiler.
//
// Flash is a small imperative control language (Skip, Shout, Delay,
// Sequential, IfThenElse, Parallel, While). A program is handed to the
// compiler as a parameter: a packed array of nodes, node 0 being the root.
// Composite nodes name their sub-programs by node index (field a = first
// sub-program, b = second), and conditional nodes name their condition by
// index into the condition vector (field c). Condition 0 is reserved for the
// constant-high signal, so `While high ...` is written with c = 0; the
// program's own condition inputs start at index 1.
//
// The operator set follows the document's Flash datatype; the node/array
// encoding, the field widths and the reserved condition 0 are choices of
// this design.
package flash_pkg;

  typedef enum logic [2:0] {
    F_SKIP     = 3'd0,
    F_SHOUT    = 3'd1,
    F_DELAY    = 3'd2,
    F_SEQ      = 3'd3,
    F_ITE      = 3'd4,
    F_PAR      = 3'd5,
    F_WHILE    = 3'd6
  } flash_op_e;

  localparam int unsigned IDX_W  = 8;  // node index width (up to 256 nodes)
  localparam int unsigned COND_W = 4;  // condition index width (up to 16)

  typedef struct packed {
    flash_op_e           op;
    logic [IDX_W-1:0]    a;     // first sub-program (Seq, ITE then, Par, While body)
    logic [IDX_W-1:0]    b;     // second sub-program (Seq, ITE else, Par)
    logic [COND_W-1:0]   c;     // condition index (ITE, While); 0 = constant high
  } flash_node_t;

  function automatic flash_node_t mk(flash_op_e op, int unsigned a = 0,
                                     int unsigned b = 0, int unsigned c = 0);
    flash_node_t n;
    n.op = op;
    n.a  = IDX_W'(a);
    n.b  = IDX_W'(b);
    n.c  = COND_W'(c);
    return n;
  endfunction

  // Default program (node 0 is the root, array element 0):
  //   While w (Sequential Delay (Parallel (IfThenElse v Shout Skip) Delay))
  // with w on condition index 1 and v on index 2. Every loop iteration passes
  // through a Delay before the body can finish, so the compiled circuit has
  // no combinational cycle. It uses all seven constructs.
  localparam int unsigned DEF_NODES = 8;
  localparam int unsigned DEF_NCOND = 2;
  localparam flash_node_t [DEF_NODES-1:0] DEF_PROG = {
    mk(F_DELAY),              // 7: right branch of Parallel
    mk(F_SKIP),               // 6: else branch
    mk(F_SHOUT),              // 5: then branch
    mk(F_ITE,   5, 6, 2),     // 4: IfThenElse v Shout Skip
    mk(F_PAR,   4, 7),        // 3: Parallel
    mk(F_DELAY),              // 2: first step of the body
    mk(F_SEQ,   2, 3),        // 1: loop body
    mk(F_WHILE, 1, 0, 1)      // 0: While w
  };

endpackage
