// rca32_cut: 32-bit ripple-carry adder used as a circuit under test, with
// five injectable stuck-at faults (two stuck-at-1, three stuck-at-0, as the
// published method specifies). The sites are this design's choice and sit where
// pseudo-random operands reach them often:
//   fault 0: carry into bit 1           stuck-at-1
//   fault 1: sum bit 5                  stuck-at-1
//   fault 2: carry into bit 3           stuck-at-0
//   fault 3: sum bit 0                  stuck-at-0
//   fault 4: carry out of bit 31        stuck-at-0
// A chain of 32 full-adder cells, carry-in 0; purely combinational.
module rca32_cut
  import bist_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [4:0]  fault_en,
  output logic [31:0] sum,
  output logic        cout
);

  logic cy;   // carry rippling from cell to cell

  always_comb begin
    cy = 1'b0;
    for (int i = 0; i < 32; i++) begin
      sum[i] = a[i] ^ b[i] ^ cy;
      cy     = (a[i] & b[i]) | (cy & (a[i] ^ b[i]));
      if (i == 0) cy = stuck(cy, fault_en[0], 1'b1);
      if (i == 2) cy = stuck(cy, fault_en[2], 1'b0);
    end
    sum[5] = stuck(sum[5], fault_en[1], 1'b1);
    sum[0] = stuck(sum[0], fault_en[3], 1'b0);
    cout   = stuck(cy, fault_en[4], 1'b0);
  end

endmodule
