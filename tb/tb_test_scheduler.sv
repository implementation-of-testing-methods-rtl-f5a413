// tb_test_scheduler: drives the scheduler with stand-in "all faults
// detected" flags and checks the session sequence cycle by cycle:
// session 1 resets both registers, loads both seeds and runs both pattern
// generators until the adder and full-adder flags are both up; session 2
// and 3 use register 1 only, with register 2 holding. The ALU flag is never
// raised, so session 3 must stop on the pattern budget after exactly
// MAX_PAT patterns. Scan mode is checked while finished, and a restart is
// checked after start is released.
module tb_test_scheduler;
  import bist_pkg::*;

  localparam int MAXP = 12;

  logic        clk = 1'b0;
  logic        rst_n, start, scan_en;
  logic        done_rca, done_fa, done_cmp, done_alu;
  bilbo_mode_e mode1, mode2;
  zsel_e       zsel1, zsel2;
  logic [1:0]  session;
  logic        clear_rca, clear_fa, clear_cmp, clear_alu;
  logic        run_rca, run_fa, run_cmp, run_alu;
  logic [15:0] pat_count;
  logic        busy, done;
  int checks = 0, failures = 0;
  int runs [4];

  always #5 clk = ~clk;

  test_scheduler #(.MAX_PAT(MAXP)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  // count pattern cycles per engine
  always @(posedge clk) begin
    if (run_rca) runs[0]++;
    if (run_fa)  runs[1]++;
    if (run_cmp) runs[2]++;
    if (run_alu) runs[3]++;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; scan_en = 0;
    done_rca = 0; done_fa = 0; done_cmp = 0; done_alu = 0;
    runs = '{0, 0, 0, 0};
    @(posedge clk); #1;
    rst_n = 1;
    check("idle hold", mode1, BILBO_LOAD);
    check("idle zsel", zsel1, Z_HOLD);
    check("idle busy", busy, 0);
    start = 1;
    @(posedge clk); #1;
    // session 1 RESET
    check("s1 session", session, 1);
    check("s1 reset m1", mode1, BILBO_RESET);
    check("s1 reset m2", mode2, BILBO_RESET);
    check("s1 clear", clear_rca && clear_fa && !clear_cmp, 1);
    @(posedge clk); #1;
    check("s1 load m1", mode1, BILBO_LOAD);
    check("s1 load z1", zsel1, Z_SEED);
    check("s1 load z2", zsel2, Z_SEED);
    @(posedge clk); #1;
    check("s1 run m1", mode1, BILBO_PRPG);
    check("s1 run m2", mode2, BILBO_PRPG);
    check("s1 run z1", zsel1, Z_ZERO);
    check("s1 run flags", {run_rca, run_fa, run_cmp, run_alu}, 4'b1100);
    repeat (3) @(posedge clk);
    #1 done_fa = 1;               // full adder finishes first: session goes on
    @(posedge clk); #1;
    check("s1 still running", run_rca, 1);
    done_rca = 1;
    #1;
    check("s1 stops at once", mode1, BILBO_LOAD);
    check("s1 patterns", pat_count, 4);
    @(posedge clk); #1;
    check("s2 session", session, 2);
    check("s2 reset m1", mode1, BILBO_RESET);
    check("s2 m2 holds", mode2, BILBO_LOAD);
    check("s2 z2 holds", zsel2, Z_HOLD);
    check("s2 clear", clear_cmp && !clear_rca, 1);
    @(posedge clk); #1;
    check("s2 load z2 holds", zsel2, Z_HOLD);
    @(posedge clk); #1;
    check("s2 run flags", {run_rca, run_fa, run_cmp, run_alu}, 4'b0010);
    check("s2 m2 holds in run", mode2, BILBO_LOAD);
    repeat (2) @(posedge clk);
    #1 done_cmp = 1;
    @(posedge clk); #1;
    check("s3 session", session, 3);
    check("s3 clear", clear_alu, 1);
    repeat (2) @(posedge clk); #1;
    check("s3 run flags", {run_rca, run_fa, run_cmp, run_alu}, 4'b0001);
    repeat (MAXP) @(posedge clk); #1;
    check("s3 budget stop", run_alu, 0);
    check("s3 patterns", pat_count, MAXP);
    @(posedge clk); #1;
    check("fin done", done, 1);
    check("fin session", session, 0);
    check("alu runs", runs[3], MAXP);
    check("cmp runs", runs[2], 2);
    check("rca runs", runs[0], 4);
    scan_en = 1; #1;
    check("fin scan m1", mode1, BILBO_SCAN);
    check("fin scan m2", mode2, BILBO_SCAN);
    scan_en = 0;
    start = 0;
    @(posedge clk); #1;
    check("back to idle", done, 0);
    done_rca = 0; done_fa = 0; done_cmp = 0;
    start = 1;
    @(posedge clk); #1;
    check("restart", session, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
