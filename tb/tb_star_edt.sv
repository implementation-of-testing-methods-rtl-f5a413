// tb_star_edt: STAR-EDT engines for the full adder, the ripple-carry adder
// and the ALU, fed pseudo-random patterns with gaps in pat_valid.
// A software model grades each pattern the same way (detection by the
// reference fault models, clusters of the pattern and its single-bit-flip
// children, greedy keep of parents that add coverage). Every cycle the
// engines' registered reports must match the model's reports for the
// pattern of the previous cycle (one clock of latency), and at the end the
// kept patterns read back from each store must equal the model's. A
// directed full-adder run checks hand-worked numbers: pattern 111 is not a
// parent (its cluster finds 1 fault), 000 is a parent whose cluster finds
// both faults, so one compressed pattern suffices.
module tb_star_edt;
  import bist_pkg::*;
  import bist_ref_pkg::*;

  localparam int NC = 4;

  logic        clk = 1'b0;
  logic        rst_n, clear, pat_valid;
  logic [63:0] pattern;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // per-engine outputs: index 0 RCA, 1 FA, 3 ALU (2 unused)
  logic        cl_valid [4], cl_parent [4], cl_kept [4], all_det [4];
  logic [3:0]  cl_count [4], n_kept [4];
  logic [9:0]  covered [4];
  logic [15:0] n_graded [4];
  logic [3:0]  rd_idx;
  logic [63:0] rd_pat [4];

  logic [2:0] cnt_rca, kept_rca; logic [4:0] cov_rca;
  logic [1:0] cnt_fa,  kept_fa;  logic [1:0] cov_fa; logic [2:0] rd_fa;
  logic [3:0] cnt_alu, kept_alu; logic [9:0] cov_alu;

  star_edt #(.CUT(CUT_RCA), .NCHILD(NC)) u_rca (
    .clk(clk), .rst_n(rst_n), .clear(clear), .pat_valid(pat_valid), .pattern(pattern),
    .cl_valid(cl_valid[0]), .cl_parent(cl_parent[0]), .cl_count(cnt_rca), .cl_kept(cl_kept[0]),
    .covered(cov_rca), .all_detected(all_det[0]), .n_kept(kept_rca), .n_graded(n_graded[0]),
    .rd_idx(rd_idx[2:0]), .rd_pattern(rd_pat[0]));
  star_edt #(.CUT(CUT_FA), .NCHILD(NC)) u_fa (
    .clk(clk), .rst_n(rst_n), .clear(clear), .pat_valid(pat_valid), .pattern(pattern[2:0]),
    .cl_valid(cl_valid[1]), .cl_parent(cl_parent[1]), .cl_count(cnt_fa), .cl_kept(cl_kept[1]),
    .covered(cov_fa), .all_detected(all_det[1]), .n_kept(kept_fa), .n_graded(n_graded[1]),
    .rd_idx(rd_idx[0]), .rd_pattern(rd_fa));
  star_edt #(.CUT(CUT_ALU), .NCHILD(NC)) u_alu (
    .clk(clk), .rst_n(rst_n), .clear(clear), .pat_valid(pat_valid), .pattern(pattern),
    .cl_valid(cl_valid[3]), .cl_parent(cl_parent[3]), .cl_count(cnt_alu), .cl_kept(cl_kept[3]),
    .covered(cov_alu), .all_detected(all_det[3]), .n_kept(kept_alu), .n_graded(n_graded[3]),
    .rd_idx(rd_idx), .rd_pattern(rd_pat[3]));

  always_comb begin
    cl_count[0] = 4'(cnt_rca); n_kept[0] = 4'(kept_rca); covered[0] = 10'(cov_rca);
    cl_count[1] = 4'(cnt_fa);  n_kept[1] = 4'(kept_fa);  covered[1] = 10'(cov_fa);
    cl_count[3] = cnt_alu;     n_kept[3] = kept_alu;     covered[3] = cov_alu;
    rd_pat[1] = 64'(rd_fa);
    cl_count[2] = '0; n_kept[2] = '0; covered[2] = '0; rd_pat[2] = '0;
  end

  // software model state
  logic [9:0]  m_cov [4];
  int          m_kept [4];
  logic [63:0] m_store [4][10];
  logic        e_valid [4], e_parent [4], e_kept [4];
  int          e_count [4];

  function automatic int width_of(int c);
    return (c == 1) ? 3 : 64;
  endfunction

  function automatic logic [9:0] all_mask(int c);
    return 10'((1 << ref_nf(c)) - 1);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic model_reset();
    for (int c = 0; c < 4; c++) begin
      m_cov[c] = '0; m_kept[c] = 0;
      e_valid[c] = 0; e_parent[c] = 0; e_kept[c] = 0; e_count[c] = 0;
    end
  endtask

  // grade the pattern presented this cycle (before the clock edge)
  task automatic model_grade();
    for (int c = 0; c < 4; c++) begin
      logic [63:0] p;
      logic [9:0]  d0, dc;
      bit          act;
      if (c == 2) continue;
      p   = (c == 1) ? 64'(pattern[2:0]) : pattern;
      act = pat_valid && (m_cov[c] != all_mask(c));
      d0  = ref_detect(c, p);
      dc  = ref_cluster(c, p, width_of(c), NC);
      e_valid[c]  = act;
      e_parent[c] = act && (d0 != 0);
      e_count[c]  = act ? $countones(dc) : 0;
      e_kept[c]   = act && (d0 != 0) && ((dc & ~m_cov[c]) != 0);
      if (e_kept[c]) begin
        m_store[c][m_kept[c]] = p;
        m_kept[c]++;
        m_cov[c] |= dc;
      end
    end
  endtask

  task automatic compare(int cyc);
    for (int c = 0; c < 4; c++) begin
      if (c == 2) continue;
      check($sformatf("c%0d cyc%0d valid", c, cyc), cl_valid[c], e_valid[c]);
      check($sformatf("c%0d cyc%0d parent", c, cyc), cl_parent[c], e_parent[c]);
      check($sformatf("c%0d cyc%0d count", c, cyc), cl_count[c], e_count[c]);
      check($sformatf("c%0d cyc%0d kept", c, cyc), cl_kept[c], e_kept[c]);
      check($sformatf("c%0d cyc%0d covered", c, cyc), covered[c], m_cov[c]);
      check($sformatf("c%0d cyc%0d n_kept", c, cyc), n_kept[c], m_kept[c]);
      check($sformatf("c%0d cyc%0d all", c, cyc), all_det[c], m_cov[c] == all_mask(c));
    end
  endtask

  task automatic tick();
    model_grade();
    @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int graded;
    rst_n = 1'b0; clear = 1'b0; pat_valid = 1'b0; pattern = '0; rd_idx = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    model_reset();
    // directed full-adder run
    pat_valid = 1'b1;
    pattern = 64'h7; tick();
    check("fa 111 parent", cl_parent[1], 0);
    check("fa 111 count", cl_count[1], 1);
    check("fa 111 kept", cl_kept[1], 0);
    pattern = 64'h0; tick();
    check("fa 000 parent", cl_parent[1], 1);
    check("fa 000 count", cl_count[1], 2);
    check("fa 000 kept", cl_kept[1], 1);
    check("fa done", all_det[1], 1);
    check("fa n_kept", n_kept[1], 1);
    pattern = 64'h5; tick();
    check("fa idle after done", cl_valid[1], 0);
    // clear, then a random run checked against the model every cycle
    clear = 1'b1; pat_valid = 1'b0;
    @(posedge clk); #1;
    clear = 1'b0;
    model_reset();
    graded = 0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      pat_valid = ($urandom % 4) != 0;
      pattern = {$urandom, $urandom};
      if (cyc % 5 == 2) pattern[31:0] = pattern[63:32] ^ 32'($urandom % 16);
      if (pat_valid && m_cov[0] != all_mask(0)) graded++;
      tick();
      compare(cyc);
    end
    check("rca graded", n_graded[0], graded);
    for (int c = 0; c < 4; c++) begin
      if (c == 2) continue;
      check($sformatf("c%0d all detected at end", c), all_det[c], 1);
      for (int i = 0; i < m_kept[c]; i++) begin
        rd_idx = 4'(i); #1;
        check($sformatf("c%0d stored pattern %0d", c, i), rd_pat[c], m_store[c][i]);
      end
    end
    $display("kept: rca %0d fa %0d alu %0d", m_kept[0], m_kept[1], m_kept[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
