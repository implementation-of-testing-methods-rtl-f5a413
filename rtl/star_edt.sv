// star_edt: STAR-EDT test-cluster engine for one circuit under test.
//
// Every clock cycle with pat_valid high (and not yet finished) it grades the
// incoming pseudo-random pattern:
//   1. fault simulation of the pattern; if it detects at least one injected
//      fault it is a parent pattern;
//   2. the phase shifter derives NCHILD children from the pattern, and the
//      parent plus its children (the test cluster) are fault simulated in
//      parallel; the faults the cluster detects are counted;
//   3. if the pattern is a parent and its cluster detects a fault not yet
//      covered, the parent is kept: it is written to the compressed-pattern
//      store and its cluster's faults are marked covered.
// When every fault is covered, all_detected rises and further patterns are
// ignored. n_kept is then the number of compressed test patterns: a tester
// only needs the parents, since the phase shifter regenerates the children.
// The flow (fault simulation, phase shifter, fault simulation of clusters,
// compressed patterns, per-cluster fault counts) follows the published method; doing it
// one pattern per clock in parallel hardware, the greedy "keep if it adds
// coverage" rule and the store size (one entry per fault, the most a greedy
// selection can keep) are this design's choices.
// Timing: results of the pattern sampled at edge t appear after edge t
// (registered): cl_valid, cl_parent, cl_count, cl_kept, covered, n_kept.
// clear (synchronous, with rst_n low acting the same) empties the store and
// the coverage for a new run.
module star_edt
  import bist_pkg::*;
#(
  parameter cut_e        CUT    = CUT_RCA,
  parameter int unsigned NCHILD = 4,
  parameter int unsigned IN_W   = cut_in_w(CUT),
  parameter int unsigned NF     = cut_nfaults(CUT),
  parameter int unsigned CW     = $clog2(NF + 1),     // fault-count width
  parameter int unsigned AW     = (NF > 1) ? $clog2(NF) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            pat_valid,
  input  logic [IN_W-1:0] pattern,
  // per-cluster report
  output logic            cl_valid,      // a cluster was graded last cycle
  output logic            cl_parent,     // its pattern detected a fault
  output logic [CW-1:0]   cl_count,      // faults its cluster detected
  output logic            cl_kept,       // its parent was kept
  // run state
  output logic [NF-1:0]   covered,
  output logic            all_detected,
  output logic [CW-1:0]   n_kept,        // compressed test patterns so far
  output logic [15:0]     n_graded,      // patterns graded so far
  // compressed-pattern store read port
  input  logic [AW-1:0]   rd_idx,
  output logic [IN_W-1:0] rd_pattern
);

  localparam int unsigned NP = NCHILD + 1;   // patterns per cluster

  logic [IN_W-1:0] child [NCHILD];
  logic [IN_W-1:0] cl_pat [NP];
  logic [NF-1:0]   det [NP];
  logic [NF-1:0]   cl_det, new_det;
  logic [CW-1:0]   cnt;
  logic            is_parent, keep, active;
  logic [IN_W-1:0] store [NF];

  phase_shifter #(.W(IN_W), .NCHILD(NCHILD)) u_ps (.parent(pattern), .child(child));

  always_comb begin
    cl_pat[0] = pattern;
    for (int k = 0; k < NCHILD; k++) cl_pat[k+1] = child[k];
  end

  // Only the detection flags are needed here; the fault-free responses stay
  // unconnected.
  for (genvar p = 0; p < NP; p++) begin : g_fs
    fault_sim #(.CUT(CUT), .IN_W(IN_W), .NF(NF)) u_fs (
      .pattern(cl_pat[p]), .good_resp(), .detect(det[p])
    );
  end

  always_comb begin
    cl_det = '0;
    for (int p = 0; p < NP; p++) cl_det |= det[p];
    cnt = '0;
    for (int f = 0; f < NF; f++) cnt += CW'(cl_det[f]);
    new_det   = cl_det & ~covered;
    active    = pat_valid && !all_detected;
    is_parent = |det[0];
    keep      = active && is_parent && (|new_det);
  end

  assign all_detected = &covered;
  assign rd_pattern   = store[rd_idx];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      covered   <= '0;
      n_kept    <= '0;
      n_graded  <= '0;
      cl_valid  <= 1'b0;
      cl_parent <= 1'b0;
      cl_count  <= '0;
      cl_kept   <= 1'b0;
    end else begin
      cl_valid  <= active;
      cl_parent <= active && is_parent;
      cl_count  <= active ? cnt : '0;
      cl_kept   <= keep;
      if (active) n_graded <= n_graded + 16'd1;
      if (keep) begin
        covered <= covered | cl_det;
        n_kept  <= n_kept + CW'(1);
      end
    end
  end

  // Store entries are only read below n_kept, so they need no reset.
  always_ff @(posedge clk) begin
    if (keep && rst_n && !clear) store[n_kept[AW-1:0]] <= pattern;
  end

endmodule
