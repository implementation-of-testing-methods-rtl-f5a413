// bist_top: BILBO-based self-test with STAR-EDT pattern compaction and
// three-session test scheduling for four circuits under test.
//
// Structure (one clock domain, synchronous active-low reset rst_n):
//   - BILBO register 1 (64 bits) generates patterns for the 32-bit
//     ripple-carry adder, the 32-bit magnitude comparator and the 32-bit ALU;
//     BILBO register 2 (3 bits) generates patterns for the 1-bit full adder.
//   - One STAR-EDT engine per CUT fault-simulates each pattern against the
//     CUT's injected stuck-at faults, builds a test cluster from every
//     parent pattern with the phase shifter, and keeps the minimum set of
//     parents that together detect every fault.
//   - test_scheduler runs session 1 (adder and full adder in parallel),
//     session 2 (comparator) and session 3 (ALU), each as reset, seed load
//     and pattern run of the BILBO registers.
// Interface: pulse or hold start to run the three sessions; done rises when
// they are over. seed1/seed2 are loaded into the registers at the start of
// each session that uses them. While idle or done, scan_en shifts the
// register chain scan_in -> BILBO 1 -> BILBO 2 -> scan_out one bit per clock.
// pattern1/pattern2 and bilbo1_mode/bilbo2_mode show the registers' current
// patterns and modes. Per CUT (index 0 RCA, 1 full adder, 2 comparator, 3 ALU) the outputs give
// the detected-fault mask, whether all faults were detected, the number of
// compressed test patterns, the number of patterns graded, and the last
// cluster's report; rd_idx reads back a kept parent pattern of each CUT.
// The architecture follows the published BILBO + STAR-EDT scheme; the widths of counters and the
// read-back ports are this design's choices.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned MAX_PAT = 256,   // pattern budget per session
  parameter int unsigned NCHILD  = 4      // children per parent pattern
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [63:0] seed1,
  input  logic [2:0]  seed2,
  input  logic        scan_en,
  input  logic        scan_in,
  output logic        scan_out,
  output logic [1:0]  session,
  output logic        busy,
  output logic        done,
  output logic [15:0] session_patterns,
  // pattern generators: current patterns and modes {B1,B2}
  output logic [63:0] pattern1,
  output logic [2:0]  pattern2,
  output logic [1:0]  bilbo1_mode,
  output logic [1:0]  bilbo2_mode,
  // per-CUT results: RCA, full adder, comparator, ALU
  output logic [4:0]  covered_rca,
  output logic [1:0]  covered_fa,
  output logic [6:0]  covered_cmp,
  output logic [9:0]  covered_alu,
  output logic [3:0]  all_detected,
  output logic [3:0]  n_kept [4],
  output logic [15:0] n_graded [4],
  output logic [3:0]  cl_valid,
  output logic [3:0]  cl_parent,
  output logic [3:0]  cl_count [4],
  output logic [3:0]  cl_kept,
  // compressed-pattern read-back
  input  logic [3:0]  rd_idx,
  output logic [63:0] rd_pattern_rca,
  output logic [2:0]  rd_pattern_fa,
  output logic [63:0] rd_pattern_cmp,
  output logic [63:0] rd_pattern_alu
);

  bilbo_mode_e mode1, mode2;
  zsel_e       zsel1, zsel2;
  logic [63:0] q1, z1;
  logic [2:0]  q2, z2;
  logic        so1;
  logic        clear_rca, clear_fa, clear_cmp, clear_alu;
  logic        run_rca, run_fa, run_cmp, run_alu;

  always_comb begin
    unique case (zsel1)
      Z_SEED:  z1 = seed1;
      Z_HOLD:  z1 = q1;
      default: z1 = '0;
    endcase
    unique case (zsel2)
      Z_SEED:  z2 = seed2;
      Z_HOLD:  z2 = q2;
      default: z2 = '0;
    endcase
  end

  bilbo_reg #(.W(64)) u_bilbo1 (
    .clk(clk), .b1(mode1[1]), .b2(mode1[0]), .si(scan_in), .z(z1), .q(q1), .so(so1)
  );

  bilbo_reg #(.W(3)) u_bilbo2 (
    .clk(clk), .b1(mode2[1]), .b2(mode2[0]), .si(so1), .z(z2), .q(q2), .so(scan_out)
  );

  test_scheduler #(.MAX_PAT(MAX_PAT)) u_sched (
    .clk(clk), .rst_n(rst_n), .start(start), .scan_en(scan_en),
    .done_rca(all_detected[0]), .done_fa(all_detected[1]),
    .done_cmp(all_detected[2]), .done_alu(all_detected[3]),
    .mode1(mode1), .zsel1(zsel1), .mode2(mode2), .zsel2(zsel2),
    .session(session),
    .clear_rca(clear_rca), .clear_fa(clear_fa), .clear_cmp(clear_cmp), .clear_alu(clear_alu),
    .run_rca(run_rca), .run_fa(run_fa), .run_cmp(run_cmp), .run_alu(run_alu),
    .pat_count(session_patterns), .busy(busy), .done(done)
  );

  // ---- session 1: ripple-carry adder (BILBO 1) ----
  logic [2:0] cnt_rca;
  logic [2:0] kept_rca;
  star_edt #(.CUT(CUT_RCA), .NCHILD(NCHILD)) u_edt_rca (
    .clk(clk), .rst_n(rst_n), .clear(clear_rca), .pat_valid(run_rca), .pattern(q1),
    .cl_valid(cl_valid[0]), .cl_parent(cl_parent[0]), .cl_count(cnt_rca), .cl_kept(cl_kept[0]),
    .covered(covered_rca), .all_detected(all_detected[0]), .n_kept(kept_rca),
    .n_graded(n_graded[0]), .rd_idx(rd_idx[2:0]), .rd_pattern(rd_pattern_rca)
  );

  // ---- session 1: full adder (BILBO 2) ----
  logic [1:0] cnt_fa;
  logic [1:0] kept_fa;
  star_edt #(.CUT(CUT_FA), .NCHILD(NCHILD)) u_edt_fa (
    .clk(clk), .rst_n(rst_n), .clear(clear_fa), .pat_valid(run_fa), .pattern(q2),
    .cl_valid(cl_valid[1]), .cl_parent(cl_parent[1]), .cl_count(cnt_fa), .cl_kept(cl_kept[1]),
    .covered(covered_fa), .all_detected(all_detected[1]), .n_kept(kept_fa),
    .n_graded(n_graded[1]), .rd_idx(rd_idx[0]), .rd_pattern(rd_pattern_fa)
  );

  // ---- session 2: magnitude comparator (BILBO 1) ----
  logic [2:0] cnt_cmp;
  logic [2:0] kept_cmp;
  star_edt #(.CUT(CUT_CMP), .NCHILD(NCHILD)) u_edt_cmp (
    .clk(clk), .rst_n(rst_n), .clear(clear_cmp), .pat_valid(run_cmp), .pattern(q1),
    .cl_valid(cl_valid[2]), .cl_parent(cl_parent[2]), .cl_count(cnt_cmp), .cl_kept(cl_kept[2]),
    .covered(covered_cmp), .all_detected(all_detected[2]), .n_kept(kept_cmp),
    .n_graded(n_graded[2]), .rd_idx(rd_idx[2:0]), .rd_pattern(rd_pattern_cmp)
  );

  // ---- session 3: ALU (BILBO 1) ----
  logic [3:0] cnt_alu;
  logic [3:0] kept_alu;
  star_edt #(.CUT(CUT_ALU), .NCHILD(NCHILD)) u_edt_alu (
    .clk(clk), .rst_n(rst_n), .clear(clear_alu), .pat_valid(run_alu), .pattern(q1),
    .cl_valid(cl_valid[3]), .cl_parent(cl_parent[3]), .cl_count(cnt_alu), .cl_kept(cl_kept[3]),
    .covered(covered_alu), .all_detected(all_detected[3]), .n_kept(kept_alu),
    .n_graded(n_graded[3]), .rd_idx(rd_idx), .rd_pattern(rd_pattern_alu)
  );

  assign pattern1    = q1;
  assign pattern2    = q2;
  assign bilbo1_mode = mode1;
  assign bilbo2_mode = mode2;

  assign cl_count[0] = 4'(cnt_rca);
  assign cl_count[1] = 4'(cnt_fa);
  assign cl_count[2] = 4'(cnt_cmp);
  assign cl_count[3] = cnt_alu;
  assign n_kept[0] = 4'(kept_rca);
  assign n_kept[1] = 4'(kept_fa);
  assign n_kept[2] = 4'(kept_cmp);
  assign n_kept[3] = kept_alu;

endmodule
