// flash_node: the Flash hardware compiler, written as a recursive
// parametrised generator.
//
// The program is the parameter PROG (see flash_pkg); this instance compiles
// node IDX. By the node's operator it builds:
//   Skip    shout = 0,     finish = start           (terminates at once)
//   Shout   shout = start, finish = start           (shouts and terminates)
//   Delay   flash_delay                             (one cycle)
//   Seq     flash_seq   with two child flash_node instances
//   ITE     flash_ite   with two children, condition PROG[IDX].c
//   Par     flash_par   with two children
//   While   flash_while with one child, condition PROG[IDX].c
// The compiler calls itself on the sub-programs exactly as the schemes in
// the document are applied recursively over the program datatype; Skip and
// Shout need no gate, so they are wires inside this generator.
//
// Ports: start (pulse), cond (all condition signals, bit 0 = constant high),
// shout, finish. Timing follows from the program: Skip/Shout/Seq/ITE/Par/
// While add no register, Delay adds one cycle, Par waits for its later
// branch. DEPTH guards against a PROG that is not a tree: elaboration stops
// with an error when the recursion gets deeper than the number of nodes.
//
// Lint note: when this module is linted as a top of its own, Verilator
// reports the first child's shout/finish as undriven; the child is the same
// module instantiated recursively and drives them, as simulation of
// flash_program (which holds this module below it) shows. Under any parent
// module the warning does not appear.
module flash_node
  import flash_pkg::*;
#(
  parameter int unsigned NODES = DEF_NODES,
  parameter flash_node_t [NODES-1:0] PROG = DEF_PROG,
  parameter int unsigned NC    = DEF_NCOND + 1,
  parameter int unsigned IDX   = 0,
  parameter int unsigned DEPTH = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NC-1:0] cond,
  output logic          shout,
  output logic          finish
);
  localparam flash_node_t N = PROG[IDX];
  localparam int unsigned A = int'(N.a);
  localparam int unsigned B = int'(N.b);
  localparam int unsigned C = int'(N.c);

  logic p_start, p_shout, p_finish;
  logic q_start, q_shout, q_finish;

  if (DEPTH >= NODES) begin : g_bad_depth
    $error("flash_node: PROG is not a tree (recursion deeper than NODES)");
  end else begin : g_node
    case (N.op)
      F_SKIP: begin : g_skip
        assign shout  = 1'b0;
        assign finish = start;
      end
      F_SHOUT: begin : g_shout
        assign shout  = start;
        assign finish = start;
      end
      F_DELAY: begin : g_delay
        flash_delay u_delay (.clk, .rst_n, .start, .shout, .finish);
      end
      F_SEQ: begin : g_seq
        flash_seq u_seq (.start, .shout, .finish,
                         .p_start, .p_shout, .p_finish,
                         .q_start, .q_shout, .q_finish);
      end
      F_ITE: begin : g_ite
        flash_ite u_ite (.start, .cond(cond[C]), .shout, .finish,
                         .p_start, .p_shout, .p_finish,
                         .q_start, .q_shout, .q_finish);
      end
      F_PAR: begin : g_par
        flash_par u_par (.clk, .rst_n, .start, .shout, .finish,
                         .p_start, .p_shout, .p_finish,
                         .q_start, .q_shout, .q_finish);
      end
      F_WHILE: begin : g_while
        flash_while u_while (.start, .cond(cond[C]), .shout, .finish,
                             .p_start, .p_shout, .p_finish);
      end
      default: begin : g_bad_op
        $error("flash_node: unknown operator");
      end
    endcase

    // First sub-program (Seq, ITE, Par, While).
    if (N.op inside {F_SEQ, F_ITE, F_PAR, F_WHILE}) begin : g_p
      flash_node #(.NODES(NODES), .PROG(PROG), .NC(NC), .IDX(A), .DEPTH(DEPTH + 1)) u_p (
        .clk, .rst_n, .start(p_start), .cond, .shout(p_shout), .finish(p_finish)
      );
    end else begin : g_no_p
      assign p_start  = 1'b0;
      assign p_shout  = 1'b0;
      assign p_finish = 1'b0;
    end

    // Second sub-program (Seq, ITE, Par).
    if (N.op inside {F_SEQ, F_ITE, F_PAR}) begin : g_q
      flash_node #(.NODES(NODES), .PROG(PROG), .NC(NC), .IDX(B), .DEPTH(DEPTH + 1)) u_q (
        .clk, .rst_n, .start(q_start), .cond, .shout(q_shout), .finish(q_finish)
      );
    end else begin : g_no_q
      assign q_start  = 1'b0;
      assign q_shout  = 1'b0;
      assign q_finish = 1'b0;
    end
  end
endmodule
