// tb_bist_top: end-to-end self-test run of bist_top at its default
// parameters (64-bit and 3-bit BILBO registers, 4 children per parent,
// 256-pattern budget per session).
//
// The full three-session test is started with seeds 4E55EAAAB9999600 and
// 010. Independently of the design, the testbench regenerates each
// session's pattern stream (the BILBO sequences from the seeds), grades it
// with the reference fault models and the same greedy cluster rule, and
// then checks per circuit: patterns graded, compressed patterns kept, fault
// coverage, and every kept pattern read back from the store. It also checks
// that the register's pattern on every graded cycle follows the expected
// sequence, that the sessions come in the order 1, 2, 3 and grade only
// their own circuits, and, after the run, that scanning out the 67-bit
// register chain returns the final register states. A second run seeds
// register 1 with its lock-up state (all ones), so its pattern never
// changes: the results are again compared with the reference, and the
// sessions that cannot reach full coverage must stop after the 256-pattern
// budget. Each mechanism (the four BILBO modes, the three sessions, parent
// and non-parent patterns, kept clusters, parents rejected for adding no
// coverage, session end on full coverage, session end on the budget) is
// counted and must occur at least once. Only the top's ports are observed.
module tb_bist_top;
  import bist_pkg::*;
  import bist_ref_pkg::*;

  localparam logic [63:0] SEED1_A = 64'h4E55_EAAA_B999_9600;
  localparam logic [2:0]  SEED2_A = 3'b010;
  logic [63:0] SEED1;
  logic [2:0]  SEED2;
  localparam int          BUDGET = 256;
  localparam int          NC = 4;

  logic        clk = 1'b0;
  logic        rst_n, start, scan_en, scan_in, scan_out;
  logic [1:0]  session;
  logic        busy, done;
  logic [15:0] session_patterns;
  logic [63:0] pattern1;
  logic [2:0]  pattern2;
  logic [1:0]  bilbo1_mode, bilbo2_mode;
  logic [4:0]  covered_rca;
  logic [1:0]  covered_fa;
  logic [6:0]  covered_cmp;
  logic [9:0]  covered_alu;
  logic [3:0]  all_detected, cl_valid, cl_parent, cl_kept;
  logic [3:0]  n_kept [4];
  logic [15:0] n_graded [4];
  logic [3:0]  cl_count [4];
  logic [3:0]  rd_idx;
  logic [63:0] rd_pattern_rca, rd_pattern_cmp, rd_pattern_alu;
  logic [2:0]  rd_pattern_fa;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .seed1(SEED1), .seed2(SEED2),
    .scan_en(scan_en), .scan_in(scan_in), .scan_out(scan_out),
    .session(session), .busy(busy), .done(done), .session_patterns(session_patterns),
    .pattern1(pattern1), .pattern2(pattern2), .bilbo1_mode(bilbo1_mode), .bilbo2_mode(bilbo2_mode),
    .covered_rca(covered_rca), .covered_fa(covered_fa), .covered_cmp(covered_cmp),
    .covered_alu(covered_alu), .all_detected(all_detected), .n_kept(n_kept),
    .n_graded(n_graded), .cl_valid(cl_valid), .cl_parent(cl_parent),
    .cl_count(cl_count), .cl_kept(cl_kept), .rd_idx(rd_idx),
    .rd_pattern_rca(rd_pattern_rca), .rd_pattern_fa(rd_pattern_fa),
    .rd_pattern_cmp(rd_pattern_cmp), .rd_pattern_alu(rd_pattern_alu)
  );

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // BILBO sequences, written out from the tap lists
  function automatic logic [63:0] next64(logic [63:0] q);
    return {~(q[0] ^ q[1] ^ q[3] ^ q[4]), q[63:1]};
  endfunction
  function automatic logic [2:0] next3(logic [2:0] q);
    return {~(q[0] ^ q[1]), q[2:1]};
  endfunction

  // reference run of one circuit: cut code 0 RCA, 1 FA, 2 CMP, 3 ALU
  int          m_graded [4], m_kept [4];
  logic [9:0]  m_cov [4];
  logic [63:0] m_store [4][10];
  int          m_parent_rejected;

  task automatic model_run(int c);
    logic [63:0] p;
    logic [9:0]  full, d0, dc;
    int          w;
    w = (c == 1) ? 3 : 64;
    p = (c == 1) ? 64'(SEED2) : SEED1;
    full = 10'((1 << ref_nf(c)) - 1);
    m_graded[c] = 0; m_kept[c] = 0; m_cov[c] = '0;
    while (m_graded[c] < BUDGET && m_cov[c] != full) begin
      d0 = ref_detect(c, p);
      dc = ref_cluster(c, p, w, NC);
      m_graded[c]++;
      if (d0 != 0 && (dc & ~m_cov[c]) != 0) begin
        m_store[c][m_kept[c]] = p;
        m_kept[c]++;
        m_cov[c] |= dc;
      end else if (d0 != 0) begin
        m_parent_rejected++;
      end
      p = (c == 1) ? 64'(next3(p[2:0])) : next64(p);
    end
  endtask

  // mechanism counters
  int n_mode [4];
  int n_session [4];
  int n_parent, n_nonparent, n_kept_cl, n_rejected, n_early_end, n_budget_end;
  int last_session;
  logic [63:0] exp_q1;
  logic [2:0]  exp_q2;

  int          prev_session;

  // sampled on the falling edge, half a cycle after the design's outputs change
  always @(negedge clk) if (rst_n) begin
    n_mode[bilbo1_mode]++;
    if (session != 0) n_session[session]++;
    for (int c = 0; c < 4; c++) begin
      if (cl_valid[c] && cl_parent[c]) n_parent++;
      if (cl_valid[c] && !cl_parent[c]) n_nonparent++;
      if (cl_kept[c]) n_kept_cl++;
      if (cl_valid[c] && cl_parent[c] && !cl_kept[c]) n_rejected++;
    end
    if (session == 1 && (cl_valid[2] || cl_valid[3])) begin
      failures++; $display("FAIL session 1 graded a session 2/3 circuit");
    end
    if (session == 2 && (cl_valid[0] || cl_valid[1] || cl_valid[3])) begin
      failures++; $display("FAIL session 2 graded another circuit");
    end
    if (session == 3 && (cl_valid[0] || cl_valid[1] || cl_valid[2])) begin
      failures++; $display("FAIL session 3 graded another circuit");
    end
    if (session != 0 && session < last_session) begin
      failures++; $display("FAIL session order");
    end
    if (session != 0) last_session = session;
    // a session that ends below the pattern budget ended on full coverage
    if (prev_session != 0 && session != prev_session && session_patterns < BUDGET) n_early_end++;
    if (prev_session != 0 && session != prev_session && session_patterns == BUDGET) n_budget_end++;
    prev_session = session;
    // pattern stream: each cycle a register runs as a generator it holds the
    // next pattern of the expected sequence; a reset restarts the sequence
    // at the seed, which the following load cycle puts in the register
    if (bilbo1_mode == BILBO_PRPG) begin
      checks++;
      if (pattern1 !== exp_q1) begin
        failures++; $display("FAIL pattern stream: %h expected %h", pattern1, exp_q1);
      end
      exp_q1 = next64(exp_q1);
    end
    if (bilbo2_mode == BILBO_PRPG) begin
      checks++;
      if (pattern2 !== exp_q2) begin
        failures++; $display("FAIL 3-bit pattern stream: %b expected %b", pattern2, exp_q2);
      end
      exp_q2 = next3(exp_q2);
    end
    if (bilbo1_mode == BILBO_RESET) exp_q1 = SEED1;
    if (bilbo2_mode == BILBO_RESET) exp_q2 = SEED2;
  end

  // compare the design's per-circuit results with the reference run
  task automatic check_results(string run);
    // per-circuit results against the reference run
    check({run, " rca covered"}, covered_rca, m_cov[0]);
    check({run, " fa covered"},  covered_fa,  m_cov[1]);
    check({run, " cmp covered"}, covered_cmp, m_cov[2]);
    check({run, " alu covered"}, covered_alu, m_cov[3]);
    for (int c = 0; c < 4; c++) begin
      check($sformatf("%s cut %0d graded", run, c), n_graded[c], m_graded[c]);
      check($sformatf("%s cut %0d kept", run, c), n_kept[c], m_kept[c]);
      check($sformatf("%s cut %0d all detected", run, c), all_detected[c],
            m_cov[c] == 10'((1 << ref_nf(c)) - 1));
      for (int i = 0; i < m_kept[c]; i++) begin
        logic [63:0] got;
        rd_idx = 4'(i); #1;
        case (c)
          0: got = rd_pattern_rca;
          1: got = 64'(rd_pattern_fa);
          2: got = rd_pattern_cmp;
          default: got = rd_pattern_alu;
        endcase
        check($sformatf("%s cut %0d stored %0d", run, c, i), got, m_store[c][i]);
      end
      $display("circuit %0d: %0d faults, %0d patterns graded, %0d compressed patterns, all detected %0d",
               c, ref_nf(c), n_graded[c], n_kept[c], all_detected[c]);
    end
  endtask

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, s1_len;
    logic [63:0] q1_end;
    logic [2:0]  q2_end;
    logic [66:0] shifted;
    n_mode = '{0, 0, 0, 0};
    n_session = '{0, 0, 0, 0};
    n_parent = 0; n_nonparent = 0; n_kept_cl = 0; n_rejected = 0; n_early_end = 0; n_budget_end = 0;
    m_parent_rejected = 0; last_session = 0; prev_session = 0;
    exp_q1 = '0; exp_q2 = '0;
    SEED1 = SEED1_A; SEED2 = SEED2_A;
    rst_n = 0; start = 0; scan_en = 0; scan_in = 0; rd_idx = '0;
    for (int c = 0; c < 4; c++) model_run(c);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    start = 1;
    cyc = 0;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
    end
    $display("self-test finished after %0d cycles", cyc);
    check_results("run 1");
    check("run 1 rejected parents", n_rejected, m_parent_rejected);
    checks++; if (n_rejected == 0)  begin failures++; $display("FAIL no parent rejected"); end
    check("last session length", session_patterns, m_graded[3]);
    // final register states, then scan them out through the chain
    q1_end = SEED1;
    for (int i = 0; i < m_graded[3]; i++) q1_end = next64(q1_end);
    s1_len = (m_graded[0] > m_graded[1]) ? m_graded[0] : m_graded[1];
    q2_end = SEED2;
    for (int i = 0; i < s1_len; i++) q2_end = next3(q2_end);
    scan_en = 1;
    for (int i = 0; i < 67; i++) begin
      shifted[i] = scan_out;
      scan_in = 1'(i & 1);
      @(posedge clk); #1;
    end
    scan_en = 0;
    check("scan out of register 2", shifted[2:0], q2_end);
    check("scan out of register 1", shifted[66:3], q1_end);
    // second run: register 1 seeded with its lock-up state (all ones), so
    // its pattern never changes; sessions that cannot reach full coverage
    // must stop on the pattern budget
    start = 0;
    @(posedge clk); #1;
    SEED1 = '1;
    last_session = 0;
    m_parent_rejected = 0;
    for (int c = 0; c < 4; c++) model_run(c);
    n_rejected = 0;
    start = 1;
    cyc = 0;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
    end
    @(negedge clk); #1;          // let the monitor see the last session end
    $display("lock-up seed run finished after %0d cycles", cyc);
    check_results("run 2");
    check("run 2 rejected parents", n_rejected, m_parent_rejected);
    checks++;
    if (n_budget_end == 0) begin failures++; $display("FAIL no session stopped on the budget"); end
    // mechanisms
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL BILBO mode %0d never used", m); end
    end
    for (int s = 1; s < 4; s++) begin
      checks++;
      if (n_session[s] == 0) begin failures++; $display("FAIL session %0d never ran", s); end
    end
    checks++; if (n_parent == 0)    begin failures++; $display("FAIL no parent pattern"); end
    checks++; if (n_nonparent == 0) begin failures++; $display("FAIL no non-parent pattern"); end
    checks++; if (n_kept_cl == 0)   begin failures++; $display("FAIL no cluster kept"); end
    checks++; if (n_early_end == 0) begin failures++; $display("FAIL no session ended on coverage"); end
    $display("mechanisms: modes reset %0d scan %0d prpg %0d load %0d; sessions %0d/%0d/%0d cycles;",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_session[1], n_session[2], n_session[3]);
    $display("            parents %0d non-parents %0d kept %0d early ends %0d budget ends %0d",
             n_parent, n_nonparent, n_kept_cl, n_early_end, n_budget_end);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
