// bilbo_reg: Built-In Logic Block Observer register of W stages.
//
// The two control inputs select one of four modes on every rising clock edge:
//   {b1,b2} = 00  RESET : all stages clear to 0.
//   {b1,b2} = 01  SCAN  : serial shift; si enters stage Q_{W-1}, each stage
//                         takes the one above it, so = Q_0 is the scan out.
//   {b1,b2} = 10  PRPG / MISR : the same right shift, but the top stage takes
//                         the feedback bit, and every stage is XORed with its
//                         parallel input z. With z held at 0 this is a
//                         pseudo-random pattern generator; with a circuit's
//                         response on z it compacts that response into a
//                         signature.
//   {b1,b2} = 11  LOAD  : normal register, q <= z.
// The mode table, the stage order (SI at the Q_N end, Q_0 last) and the fact
// that the feedback uses Q_0 and the inverted Q_1 come from the published
// BILBO schematic. The feedback is an XNOR of the stages selected by TAPS, so the
// all-zero state left by RESET is a legal PRPG state and the lock-up state
// is all ones; for W = 2 and 3 the default TAPS select exactly Q_0 and Q_1.
// For wider registers the extra taps making the sequence maximal length
// (period 2^W - 1) are this design's choice (see bist_pkg::lfsr_taps).
// Timing: one mode operation per clock, outputs are the register state.
module bilbo_reg
  import bist_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = W'(lfsr_taps(W))
) (
  input  logic         clk,
  input  logic         b1,
  input  logic         b2,
  input  logic         si,     // scan input
  input  logic [W-1:0] z,      // parallel inputs (response or load data)
  output logic [W-1:0] q,      // register state (pattern / signature)
  output logic         so      // scan output, equals q[0]
);

  bilbo_mode_e mode;
  logic        fb;

  assign mode = bilbo_mode_e'({b1, b2});
  assign fb   = ~(^(q & TAPS));
  assign so   = q[0];

  always_ff @(posedge clk) begin
    unique case (mode)
      BILBO_RESET: q <= '0;
      BILBO_SCAN:  q <= {si, q[W-1:1]};
      BILBO_PRPG:  q <= z ^ {fb, q[W-1:1]};
      BILBO_LOAD:  q <= z;
    endcase
  end

endmodule
