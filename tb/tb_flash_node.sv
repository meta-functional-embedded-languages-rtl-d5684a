// tb_flash_node: compiles small Flash programs with the recursive compiler
// and compares their shout/finish traces, cycle by cycle from the start
// pulse, with traces worked out by hand from the language's timing rules
// (Skip and Shout take no time, Delay one cycle, Sequential adds, Parallel
// waits for the later branch, While re-tests its condition on each entry).
//   A: Skip                                   finish at 0
//   B: Shout                                  shout and finish at 0
//   C: Seq Shout (Seq Delay Shout)            shout at 0 and 1, finish at 1
//   D: IfThenElse w Delay Shout               w=1: finish at 1; w=0: shout+finish at 0
//   E: Par Delay (Seq Delay Delay)            finish at 2
//   F: While w (Seq Shout Delay)              w high for k entries: k shouts, finish at k
module tb_flash_node;
  import flash_pkg::*;

  localparam int T = 8;  // cycles recorded per run

  localparam flash_node_t [0:0] PA = {mk(F_SKIP)};
  localparam flash_node_t [0:0] PB = {mk(F_SHOUT)};
  localparam flash_node_t [4:0] PC = {mk(F_SHOUT), mk(F_DELAY), mk(F_SEQ, 3, 4),
                                      mk(F_SHOUT), mk(F_SEQ, 1, 2)};
  localparam flash_node_t [2:0] PD = {mk(F_SHOUT), mk(F_DELAY), mk(F_ITE, 1, 2, 1)};
  localparam flash_node_t [4:0] PE = {mk(F_DELAY), mk(F_DELAY), mk(F_SEQ, 3, 4),
                                      mk(F_DELAY), mk(F_PAR, 1, 2)};
  localparam flash_node_t [3:0] PF = {mk(F_DELAY), mk(F_SHOUT), mk(F_SEQ, 2, 3),
                                      mk(F_WHILE, 1, 0, 1)};

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, w;
  logic [5:0] shout, finish;
  int checks = 0, failures = 0;

  flash_node #(.NODES(1), .PROG(PA), .NC(1)) dut_a (.clk, .rst_n, .start, .cond(1'b1),
                                                   .shout(shout[0]), .finish(finish[0]));
  flash_node #(.NODES(1), .PROG(PB), .NC(1)) dut_b (.clk, .rst_n, .start, .cond(1'b1),
                                                   .shout(shout[1]), .finish(finish[1]));
  flash_node #(.NODES(5), .PROG(PC), .NC(1)) dut_c (.clk, .rst_n, .start, .cond(1'b1),
                                                   .shout(shout[2]), .finish(finish[2]));
  flash_node #(.NODES(3), .PROG(PD), .NC(2)) dut_d (.clk, .rst_n, .start, .cond({w, 1'b1}),
                                                   .shout(shout[3]), .finish(finish[3]));
  flash_node #(.NODES(5), .PROG(PE), .NC(1)) dut_e (.clk, .rst_n, .start, .cond(1'b1),
                                                   .shout(shout[4]), .finish(finish[4]));
  flash_node #(.NODES(4), .PROG(PF), .NC(2)) dut_f (.clk, .rst_n, .start, .cond({w, 1'b1}),
                                                   .shout(shout[5]), .finish(finish[5]));

  always #5 clk = ~clk;

  logic [T-1:0] sh_tr [6], fi_tr [6];

  // One run: reset, start pulse at cycle 0, w taken from w_seq[cycle].
  task automatic run(logic [T-1:0] w_seq);
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < T; t++) begin
      start = (t == 0);
      w = w_seq[t];
      #1;
      for (int k = 0; k < 6; k++) begin
        sh_tr[k][t] = shout[k];
        fi_tr[k][t] = finish[k];
      end
      @(negedge clk);
    end
    start = 1'b0;
  endtask

  task automatic expect_tr(int k, logic [T-1:0] sh, logic [T-1:0] fi, string name);
    checks++;
    if (sh_tr[k] !== sh || fi_tr[k] !== fi) begin
      failures++;
      $display("FAIL %s: shout %b finish %b, expected shout %b finish %b (bit 0 = cycle 0)",
               name, sh_tr[k], fi_tr[k], sh, fi);
    end
  endtask

  initial begin
    start = 1'b0; w = 1'b0;
    repeat (2) @(posedge clk);

    run(8'b0000_0111);  // w high for the first three loop entries
    expect_tr(0, 8'b0000_0000, 8'b0000_0001, "A Skip");
    expect_tr(1, 8'b0000_0001, 8'b0000_0001, "B Shout");
    expect_tr(2, 8'b0000_0011, 8'b0000_0010, "C Seq");
    expect_tr(3, 8'b0000_0000, 8'b0000_0010, "D ITE w=1");
    expect_tr(4, 8'b0000_0000, 8'b0000_0100, "E Par");
    expect_tr(5, 8'b0000_0111, 8'b0000_1000, "F While 3 iterations");

    run(8'b0000_0000);  // w low: else branch, loop not entered
    expect_tr(3, 8'b0000_0001, 8'b0000_0001, "D ITE w=0");
    expect_tr(5, 8'b0000_0000, 8'b0000_0001, "F While 0 iterations");

    run(8'b0001_1111);  // five iterations
    expect_tr(5, 8'b0001_1111, 8'b0010_0000, "F While 5 iterations");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
