// full_adder_cut: 1-bit full adder used as a circuit under test, with two
// injectable stuck-at faults.
//
// sum = a ^ b ^ cin, carry = a&b | cin&(a^b). fault_en[k] forces one internal
// node to a fixed value; with fault_en = 0 the adder is fault free, so the
// same module serves as the "no fault" and the "faulty" copy. The published
// method injects one stuck-at-0 and one stuck-at-1 fault; their sites are this
// design's choice:
//   fault 0: carry output stuck-at-1
//   fault 1: half-sum node a^b stuck-at-0
// Purely combinational.
module full_adder_cut
  import bist_pkg::*;
(
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  logic [1:0] fault_en,
  output logic       sum,
  output logic       carry
);

  logic hs;

  always_comb begin
    hs    = stuck(a ^ b, fault_en[1], 1'b0);
    sum   = hs ^ cin;
    carry = stuck((a & b) | (cin & hs), fault_en[0], 1'b1);
  end

endmodule
