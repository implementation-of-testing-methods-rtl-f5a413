// cut_unit: one copy of a circuit under test (CUT), selected by the CUT
// parameter, seen through a uniform interface: a test pattern in, the CUT's
// response (zero-extended to RESP_W bits) out, and a fault-enable vector.
//
// Pattern to CUT input mapping (this design's choice; the published waveforms show the
// 64-bit pattern d[63:0] and the 3-bit pattern {w,x,z} but not how the bits
// are split):
//   full adder : a = pattern[2], b = pattern[1], cin = pattern[0]
//   RCA, comparator, ALU : a = pattern[63:32], b = pattern[31:0]
//   ALU opcode : pattern[2:0] (shared with the low bits of b)
// Response packing: FA {sum, carry}; RCA {cout, sum}; comparator {gt, eq, lt};
// ALU y. Purely combinational.
module cut_unit
  import bist_pkg::*;
#(
  parameter cut_e        CUT  = CUT_RCA,
  parameter int unsigned IN_W = cut_in_w(CUT),
  parameter int unsigned NF   = cut_nfaults(CUT)
) (
  input  logic [IN_W-1:0]   pattern,
  input  logic [NF-1:0]     fault_en,
  output logic [RESP_W-1:0] resp
);

  if (CUT == CUT_FA) begin : g_fa
    logic sum, carry;
    full_adder_cut u_cut (
      .a(pattern[2]), .b(pattern[1]), .cin(pattern[0]),
      .fault_en(fault_en), .sum(sum), .carry(carry)
    );
    assign resp = RESP_W'({sum, carry});
  end else if (CUT == CUT_RCA) begin : g_rca
    logic [31:0] sum;
    logic        cout;
    rca32_cut u_cut (
      .a(pattern[63:32]), .b(pattern[31:0]),
      .fault_en(fault_en), .sum(sum), .cout(cout)
    );
    assign resp = {cout, sum};
  end else if (CUT == CUT_CMP) begin : g_cmp
    logic gt, eq, lt;
    mag_comp32_cut u_cut (
      .a(pattern[63:32]), .b(pattern[31:0]),
      .fault_en(fault_en), .gt(gt), .eq(eq), .lt(lt)
    );
    assign resp = RESP_W'({gt, eq, lt});
  end else begin : g_alu
    logic [31:0] y;
    alu32_cut u_cut (
      .a(pattern[63:32]), .b(pattern[31:0]), .op(alu_op_e'(pattern[2:0])),
      .fault_en(fault_en), .y(y)
    );
    assign resp = RESP_W'(y);
  end

endmodule
