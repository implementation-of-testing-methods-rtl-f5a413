// phase_shifter: derives NCHILD child patterns from one parent pattern.
//
// Child k (k = 0 .. NCHILD-1) is the parent with one bit inverted, bit
// W-1-(k mod W): the first child flips the most significant bit, the next
// the bit below it, and so on. Together with the parent the children form a
// test cluster: patterns that lie one bit away from a pattern known to
// detect a fault, and so likely to detect faults near it. The published method gives
// the phase shifter's role; four children per parent and the
// single-bit-inversion rule are read from its waveforms, which show four
// derived patterns and, for an all-zero parent, the children 1000...,
// 0100..., 0010..., 0001.... The wrap-round for NCHILD > W is this design's.
// Purely combinational.
module phase_shifter #(
  parameter int unsigned W      = 64,
  parameter int unsigned NCHILD = 4
) (
  input  logic [W-1:0] parent,
  output logic [W-1:0] child [NCHILD]
);

  for (genvar k = 0; k < NCHILD; k++) begin : g_child
    localparam int unsigned BIT = W - 1 - (k % W);
    assign child[k] = parent ^ (W'(1) << BIT);
  end

endmodule
