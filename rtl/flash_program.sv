// flash_program: a complete compiled Flash program.
//
// Wraps the root of the recursive compiler (flash_node, node 0) and builds
// its condition vector: bit 0 is the constant-high signal `high`, bits
// 1..NCOND are the program's condition inputs. The interface is the one the
// document gives for every compiled Flash program: a `start` pulse in, a
// `shout` output and a `finish` pulse out.
//
// The default program (flash_pkg::DEF_PROG) is
//   While w (Sequential Delay (Parallel (IfThenElse v Shout Skip) Delay))
// with w = cond[0] and v = cond[1].
module flash_program
  import flash_pkg::*;
#(
  parameter int unsigned NODES = DEF_NODES,
  parameter int unsigned NCOND = DEF_NCOND,
  parameter flash_node_t [NODES-1:0] PROG = DEF_PROG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NCOND-1:0] cond,
  output logic             shout,
  output logic             finish
);
  logic [NCOND:0] cond_all;
  assign cond_all = {cond, 1'b1};

  flash_node #(.NODES(NODES), .PROG(PROG), .NC(NCOND + 1), .IDX(0), .DEPTH(0)) u_root (
    .clk, .rst_n, .start, .cond(cond_all), .shout, .finish
  );
endmodule
