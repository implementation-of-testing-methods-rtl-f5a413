// mag_comp32_cut: 32-bit unsigned magnitude comparator used as a circuit under
// test, with seven injectable stuck-at faults (four stuck-at-1, three
// stuck-at-0, as the published method specifies).
//
// Outputs gt, eq, lt (a > b, a == b, a < b). Each bit position makes a
// "greater", "less" and "equal" term; these are combined from the most
// significant bit down, the first unequal bit deciding. Fault sites (this
// design's choice, placed near the top bits so pseudo-random operands reach
// them):
//   fault 0: greater term of bit 31   stuck-at-1
//   fault 1: less term of bit 30      stuck-at-1
//   fault 2: equal term of bit 29     stuck-at-1
//   fault 3: eq output                stuck-at-1
//   fault 4: greater term of bit 30   stuck-at-0
//   fault 5: equal term of bit 31     stuck-at-0
//   fault 6: lt output                stuck-at-0
// Purely combinational.
module mag_comp32_cut
  import bist_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [6:0]  fault_en,
  output logic        gt,
  output logic        eq,
  output logic        lt
);

  logic [31:0] gv, lv, ev;
  logic        g, l, e;

  always_comb begin
    gv = a & ~b;
    lv = ~a & b;
    ev = ~(a ^ b);
    gv[31] = stuck(gv[31], fault_en[0], 1'b1);
    lv[30] = stuck(lv[30], fault_en[1], 1'b1);
    ev[29] = stuck(ev[29], fault_en[2], 1'b1);
    gv[30] = stuck(gv[30], fault_en[4], 1'b0);
    ev[31] = stuck(ev[31], fault_en[5], 1'b0);
    g = 1'b0;
    l = 1'b0;
    e = 1'b1;
    for (int i = 31; i >= 0; i--) begin
      g = g | (e & gv[i]);
      l = l | (e & lv[i]);
      e = e & ev[i];
    end
    gt = g;
    eq = stuck(e, fault_en[3], 1'b1);
    lt = stuck(l, fault_en[6], 1'b0);
  end

endmodule
