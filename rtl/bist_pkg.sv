// bist_pkg: types and constants shared by the BILBO / STAR-EDT self-test design.
//
// - bilbo_mode_e encodes the two BILBO control inputs {B1,B2}: 00 clears the
//   register, 01 shifts it as a scan chain, 10 runs it as a pattern generator
//   or signature register, 11 loads it in parallel. This mapping follows the
//   source description; the numeric type itself is this design's choice.
// - cut_e names the four circuits under test (CUTs). The cut_*() functions give
//   the width of the pattern a CUT consumes, the width of its response (zero
//   extended to RESP_W when CUTs are handled generically) and its number of
//   injectable stuck-at faults (2, 5, 7 and 10).
// - lfsr_taps() returns the feedback mask used by bilbo_reg in PRPG/MISR mode:
//   bit i set means stage Q_i takes part in the feedback. The masks are
//   maximal-length trinomials/pentanomials for a right-shifting register whose
//   feedback enters the top stage; the 2- and 3-bit masks tap Q_0 and Q_1 as
//   the BILBO schematic does. Masks for other widths are this design's choice.
// - zsel_e selects what the scheduler puts on a BILBO's parallel inputs.
// - stuck() is the fault-injection primitive: when en is set the node takes the
//   stuck value, otherwise it passes the fault-free value.
package bist_pkg;

  typedef enum logic [1:0] {
    BILBO_RESET = 2'b00,
    BILBO_SCAN  = 2'b01,
    BILBO_PRPG  = 2'b10,   // also MISR: the parallel inputs are XORed in
    BILBO_LOAD  = 2'b11    // normal register mode
  } bilbo_mode_e;

  typedef enum logic [1:0] {
    CUT_FA  = 2'd0,   // 1-bit full adder
    CUT_RCA = 2'd1,   // 32-bit ripple-carry adder
    CUT_CMP = 2'd2,   // 32-bit magnitude comparator
    CUT_ALU = 2'd3    // 32-bit ALU
  } cut_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0, ALU_SUB = 3'd1, ALU_AND = 3'd2, ALU_OR  = 3'd3,
    ALU_XOR = 3'd4, ALU_NOR = 3'd5, ALU_SHL = 3'd6, ALU_SHR = 3'd7
  } alu_op_e;

  // Parallel-input source of a BILBO register while the scheduler drives it.
  typedef enum logic [1:0] {
    Z_ZERO = 2'd0,   // PRPG: no response folded in
    Z_SEED = 2'd1,   // LOAD: parallel load of the seed
    Z_HOLD = 2'd2    // LOAD of its own state: keeps the register unchanged
  } zsel_e;

  localparam int unsigned RESP_W = 33;  // widest CUT response (RCA sum + carry)

  function automatic int unsigned cut_in_w(cut_e c);
    return (c == CUT_FA) ? 3 : 64;
  endfunction

  function automatic int unsigned cut_out_w(cut_e c);
    case (c)
      CUT_FA:  return 2;
      CUT_RCA: return 33;
      CUT_CMP: return 3;
      default: return 32;
    endcase
  endfunction

  function automatic int unsigned cut_nfaults(cut_e c);
    case (c)
      CUT_FA:  return 2;
      CUT_RCA: return 5;
      CUT_CMP: return 7;
      default: return 10;
    endcase
  endfunction

  function automatic logic [63:0] lfsr_taps(int unsigned w);
    case (w)
      2:       return 64'h3;                 // x^2+x+1
      3:       return 64'h3;                 // x^3+x^2+1
      4:       return 64'h3;                 // x^4+x^3+1
      8:       return 64'h1D;                // x^8+x^6+x^5+x^4+1
      16:      return 64'h2D;                // x^16+x^15+x^13+x^4+1 (stages 0,2,3,5)
      32:      return 64'hC000_0401;         // x^32+x^22+x^2+x+1
      64:      return 64'h1B;                // x^64+x^63+x^61+x^60+1
      default: return 64'h3;
    endcase
  endfunction

  function automatic logic stuck(logic v, logic en, logic val);
    return en ? val : v;
  endfunction

endpackage
