// alu32_cut: 32-bit ALU used as a circuit under test, with ten injectable
// stuck-at faults (eight stuck-at-1, two stuck-at-0, as the published
// method specifies).
//
// The published method names the ALU and its width only; its operation set is this
// design's choice (bist_pkg::alu_op_e): ADD, SUB, AND, OR, XOR, NOR, shift a
// left by one, shift a right by one. ADD/SUB share one ripple-carry adder
// (b inverted and carry-in 1 for SUB), so that internal carry nodes exist
// to carry faults. Fault sites, also this design's choice:
//   fault 0: adder carry into bit 2     stuck-at-1
//   fault 1: adder carry into bit 9     stuck-at-1
//   fault 2: AND term bit 4             stuck-at-1
//   fault 3: OR term bit 6              stuck-at-1
//   fault 4: XOR term bit 3             stuck-at-1
//   fault 5: NOR term bit 7             stuck-at-1
//   fault 6: result bit 0               stuck-at-1
//   fault 7: result bit 31              stuck-at-1
//   fault 8: adder carry into bit 5     stuck-at-0
//   fault 9: result bit 16              stuck-at-0
// Purely combinational.
module alu32_cut
  import bist_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  input  logic [9:0]  fault_en,
  output logic [31:0] y
);

  logic [31:0] bx, s, andv, orv, xorv, norv;
  logic        cy;   // adder carry rippling from cell to cell

  always_comb begin
    bx   = (op == ALU_SUB) ? ~b : b;
    cy = (op == ALU_SUB);
    for (int i = 0; i < 32; i++) begin
      s[i] = a[i] ^ bx[i] ^ cy;
      cy   = (a[i] & bx[i]) | (cy & (a[i] ^ bx[i]));
      if (i == 1) cy = stuck(cy, fault_en[0], 1'b1);
      if (i == 4) cy = stuck(cy, fault_en[8], 1'b0);
      if (i == 8) cy = stuck(cy, fault_en[1], 1'b1);
    end
    andv = a & b;
    orv  = a | b;
    xorv = a ^ b;
    norv = ~(a | b);
    andv[4] = stuck(andv[4], fault_en[2], 1'b1);
    orv[6]  = stuck(orv[6],  fault_en[3], 1'b1);
    xorv[3] = stuck(xorv[3], fault_en[4], 1'b1);
    norv[7] = stuck(norv[7], fault_en[5], 1'b1);
    unique case (op)
      ALU_ADD, ALU_SUB: y = s;
      ALU_AND:          y = andv;
      ALU_OR:           y = orv;
      ALU_XOR:          y = xorv;
      ALU_NOR:          y = norv;
      ALU_SHL:          y = {a[30:0], 1'b0};
      ALU_SHR:          y = {1'b0, a[31:1]};
    endcase
    y[0]  = stuck(y[0],  fault_en[6], 1'b1);
    y[31] = stuck(y[31], fault_en[7], 1'b1);
    y[16] = stuck(y[16], fault_en[9], 1'b0);
  end

endmodule
