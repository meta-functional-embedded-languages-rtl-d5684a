// tb_flash_family: the compiler invariant "finish implies started" on a
// family of compiled programs, plus an equivalence check of each compiled
// circuit against a behavioural reference.
//
// Six programs of different shapes (nested loops, loops inside Parallel,
// Parallel inside loops, instantaneous branches outside loops) are compiled
// by flash_program. Each gets random conditions and random start pulses,
// also while it is running. Every cycle the testbench
//  * evaluates the program with an interpreter: node signals are computed
//    by repeated passes over the node array, from all-low, until they no
//    longer change (the least fixpoint of the compilation rules), then the
//    Delay and synchroniser state is advanced; and compares shout and
//    finish with the compiled circuit;
//  * checks the invariant with an independent count of starts so far, and
//    that obs_flash_started agrees.
// Every loop body in these programs passes a Delay before it can finish,
// so the fixpoint is unique.
module tb_flash_family;
  import flash_pkg::*;

  localparam int N  = 10;  // nodes per program (padded with Skip)
  localparam int NP = 6;

  localparam flash_node_t [N-1:0] PROGS [NP] = '{
    // Seq (Par Delay (Seq Delay Shout)) (ITE c1 Shout Delay)
    {mk(F_SKIP), mk(F_DELAY), mk(F_SHOUT), mk(F_ITE, 7, 8, 1), mk(F_SHOUT), mk(F_DELAY),
     mk(F_SEQ, 4, 5), mk(F_DELAY), mk(F_PAR, 2, 3), mk(F_SEQ, 1, 6)},
    // While c1 (Par (Seq Delay Shout) (ITE c2 Delay (Seq Delay Delay)))
    {mk(F_DELAY), mk(F_DELAY), mk(F_SEQ, 8, 9), mk(F_DELAY), mk(F_ITE, 6, 7, 2), mk(F_SHOUT),
     mk(F_DELAY), mk(F_SEQ, 3, 4), mk(F_PAR, 2, 5), mk(F_WHILE, 1, 0, 1)},
    // Par (While c1 (Seq Delay Shout)) (ITE c2 Skip Delay)
    {mk(F_SKIP), mk(F_SKIP), mk(F_DELAY), mk(F_SKIP), mk(F_ITE, 6, 7, 2), mk(F_SHOUT),
     mk(F_DELAY), mk(F_SEQ, 3, 4), mk(F_WHILE, 2, 0, 1), mk(F_PAR, 1, 5)},
    // Seq (While c1 Delay) (While c2 (Seq Shout Delay))
    {mk(F_SKIP), mk(F_SKIP), mk(F_SKIP), mk(F_DELAY), mk(F_SHOUT), mk(F_SEQ, 5, 6),
     mk(F_WHILE, 4, 0, 2), mk(F_DELAY), mk(F_WHILE, 2, 0, 1), mk(F_SEQ, 1, 3)},
    // ITE c1 (Par Shout Skip) (While c2 (Par Delay Delay))
    {mk(F_SKIP), mk(F_SKIP), mk(F_DELAY), mk(F_DELAY), mk(F_PAR, 6, 7), mk(F_WHILE, 5, 0, 2),
     mk(F_SKIP), mk(F_SHOUT), mk(F_PAR, 2, 3), mk(F_ITE, 1, 4, 1)},
    // While c1 (Seq Delay (While c2 (Seq Delay Shout)))
    {mk(F_SKIP), mk(F_SKIP), mk(F_SKIP), mk(F_SHOUT), mk(F_DELAY), mk(F_SEQ, 5, 6),
     mk(F_WHILE, 4, 0, 2), mk(F_DELAY), mk(F_SEQ, 2, 3), mk(F_WHILE, 1, 0, 1)}
  };

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NP-1:0] start, shout, finish, obs_ok;
  logic [1:0]    cond [NP];
  int checks = 0, failures = 0;
  int n_fin [NP], n_sh [NP];

  for (genvar k = 0; k < NP; k++) begin : g_prog
    flash_program #(.NODES(N), .NCOND(2), .PROG(PROGS[k])) dut (
      .clk, .rst_n, .start(start[k]), .cond(cond[k]), .shout(shout[k]), .finish(finish[k]));
    obs_flash_started obs (.clk, .rst_n, .start(start[k]), .finish(finish[k]), .ok(obs_ok[k]));
  end

  always #5 clk = ~clk;

  // interpreter state, per program and node
  bit dq [NP][N];
  bit pw [NP][N];
  bit qw [NP][N];

  task automatic interpret(int k, bit st0, bit [2:0] cv, output bit o_sh, output bit o_fi);
    bit st [N], sh [N], fi [N];
    bit changed, en, nst_a, nst_b, nsh, nfi;
    flash_node_t nd;
    for (int i = 0; i < N; i++) begin st[i] = 0; sh[i] = 0; fi[i] = 0; end
    st[0] = st0;
    do begin
      changed = 0;
      for (int i = 0; i < N; i++) begin
        nd = PROGS[k][i];
        nst_a = st[nd.a]; nst_b = st[nd.b]; nsh = 0; nfi = 0;
        case (nd.op)
          F_SKIP:  begin nsh = 0; nfi = st[i]; end
          F_SHOUT: begin nsh = st[i]; nfi = st[i]; end
          F_DELAY: begin nsh = 0; nfi = dq[k][i]; end
          F_SEQ:   begin nst_a = st[i]; nst_b = fi[nd.a]; nfi = fi[nd.b]; nsh = sh[nd.a] | sh[nd.b]; end
          F_ITE:   begin nst_a = st[i] & cv[nd.c]; nst_b = st[i] & ~cv[nd.c];
                         nfi = fi[nd.a] | fi[nd.b]; nsh = sh[nd.a] | sh[nd.b]; end
          F_PAR:   begin nst_a = st[i]; nst_b = st[i];
                         nfi = (fi[nd.a] | pw[k][i]) & (fi[nd.b] | qw[k][i]);
                         nsh = sh[nd.a] | sh[nd.b]; end
          default: begin en = st[i] | fi[nd.a]; nst_a = en & cv[nd.c]; nfi = en & ~cv[nd.c];
                         nsh = sh[nd.a]; end
        endcase
        if (nd.op inside {F_SEQ, F_ITE, F_PAR, F_WHILE} && st[nd.a] != nst_a) begin
          st[nd.a] = nst_a; changed = 1;
        end
        if (nd.op inside {F_SEQ, F_ITE, F_PAR} && st[nd.b] != nst_b) begin
          st[nd.b] = nst_b; changed = 1;
        end
        if (sh[i] != nsh || fi[i] != nfi) begin sh[i] = nsh; fi[i] = nfi; changed = 1; end
      end
    end while (changed);
    // advance state
    for (int i = 0; i < N; i++) begin
      nd = PROGS[k][i];
      if (nd.op == F_DELAY) dq[k][i] = st[i];
      if (nd.op == F_PAR) begin
        pw[k][i] = (fi[nd.a] | pw[k][i]) & ~fi[i];
        qw[k][i] = (fi[nd.b] | qw[k][i]) & ~fi[i];
      end
    end
    o_sh = sh[0];
    o_fi = fi[0];
  endtask

  initial begin
    int starts [NP];
    bit e_sh, e_fi;
    start = '0;
    foreach (cond[k]) cond[k] = '0;
    foreach (n_fin[k]) begin n_fin[k] = 0; n_sh[k] = 0; end
    repeat (2) @(posedge clk);
    for (int run = 0; run < 40; run++) begin
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) rst_n = 1'b1;
      for (int k = 0; k < NP; k++) begin
        starts[k] = 0;
        for (int i = 0; i < N; i++) begin dq[k][i] = 0; pw[k][i] = 0; qw[k][i] = 0; end
      end
      for (int t = 0; t < 60; t++) begin
        for (int k = 0; k < NP; k++) begin
          start[k] = 1'(($urandom % 8) == 0);
          cond[k]  = {1'(($urandom % 3) != 0), 1'(($urandom % 3) != 0)};
        end
        #1;
        for (int k = 0; k < NP; k++) begin
          interpret(k, start[k], {cond[k], 1'b1}, e_sh, e_fi);
          if (start[k]) starts[k]++;
          checks += 4;
          if (shout[k] !== e_sh) begin
            failures++;
            $display("FAIL program %0d run %0d cycle %0d: shout=%0b expected %0b", k, run, t, shout[k], e_sh);
          end
          if (finish[k] !== e_fi) begin
            failures++;
            $display("FAIL program %0d run %0d cycle %0d: finish=%0b expected %0b", k, run, t, finish[k], e_fi);
          end
          if (finish[k] && starts[k] == 0) begin
            failures++;
            $display("FAIL program %0d run %0d cycle %0d: finished without a start", k, run, t);
          end
          if (obs_ok[k] !== !(finish[k] && starts[k] == 0)) begin
            failures++;
            $display("FAIL program %0d: observer disagrees", k);
          end
          if (finish[k]) n_fin[k]++;
          if (shout[k]) n_sh[k]++;
        end
        @(negedge clk);
      end
    end
    for (int k = 0; k < NP; k++) begin
      checks++;
      $display("program %0d: %0d finishes, %0d shouts", k, n_fin[k], n_sh[k]);
      if (n_fin[k] == 0 || n_sh[k] == 0) begin
        failures++;
        $display("FAIL program %0d never finished or never shouted", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
