// fault_sim: parallel single-fault simulator for one test pattern.
//
// It holds one fault-free copy of the selected CUT and one copy per
// injectable fault, each with exactly that fault switched on, all fed the same
// pattern. A fault is detected by the pattern when its copy's response
// differs from the fault-free response: detect[k] = 1. This is the "fault
// simulation" step of the STAR-EDT flow, done in hardware so that a pattern is
// graded in the same clock cycle it is applied. Whole-response comparison,
// like the published method's signal that flags a faulty circuit when its output
// differs from the fault-free one. Purely combinational.
module fault_sim
  import bist_pkg::*;
#(
  parameter cut_e        CUT  = CUT_RCA,
  parameter int unsigned IN_W = cut_in_w(CUT),
  parameter int unsigned NF   = cut_nfaults(CUT)
) (
  input  logic [IN_W-1:0]   pattern,
  output logic [RESP_W-1:0] good_resp,   // fault-free response
  output logic [NF-1:0]     detect       // per-fault detection flags
);

  cut_unit #(.CUT(CUT), .IN_W(IN_W), .NF(NF)) u_good (
    .pattern(pattern), .fault_en('0), .resp(good_resp)
  );

  for (genvar k = 0; k < NF; k++) begin : g_faulty
    logic [RESP_W-1:0] resp;
    cut_unit #(.CUT(CUT), .IN_W(IN_W), .NF(NF)) u_bad (
      .pattern(pattern), .fault_en(NF'(1) << k), .resp(resp)
    );
    assign detect[k] = (resp != good_resp);
  end

endmodule
