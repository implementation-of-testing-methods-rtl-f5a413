// test_scheduler: runs the self-test in three sessions that share the
// pattern generators, as the test-scheduling scheme prescribes:
//   session 1: 32-bit ripple-carry adder (from BILBO register 1) and 1-bit
//              full adder (from BILBO register 2), tested side by side;
//   session 2: 32-bit magnitude comparator (from BILBO register 1);
//   session 3: 32-bit ALU (from BILBO register 1).
// Each session has three phases: RESET (both BILBOs in mode 00, and a clear
// pulse to the session's STAR-EDT engines), LOAD (mode 11, parallel load of
// the seed) and RUN (mode 10 with zero parallel input: a new pseudo-random
// pattern every clock, graded by the session's engines). RUN ends when every
// engine of the session reports all faults detected, or after MAX_PAT
// patterns. After session 3 the scheduler holds in FIN with done high until
// start is released. While idle or finished, scan_en puts both BILBOs in
// scan mode (mode 01) so their contents can be shifted out; otherwise they
// hold their state by loading it back (mode 11 with their own outputs on the
// parallel inputs).
// Session order and CUT-to-register assignment follow the published scheme; the phase
// sequence, the pattern budget and the idle behaviour are this design's.
module test_scheduler
  import bist_pkg::*;
#(
  parameter int unsigned MAX_PAT = 256    // pattern budget per session
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        scan_en,
  input  logic        done_rca,
  input  logic        done_fa,
  input  logic        done_cmp,
  input  logic        done_alu,
  output bilbo_mode_e mode1,        // BILBO register 1 (64 bits)
  output zsel_e       zsel1,
  output bilbo_mode_e mode2,        // BILBO register 2 (3 bits)
  output zsel_e       zsel2,
  output logic [1:0]  session,      // 0 outside sessions, else 1..3
  output logic        clear_rca,
  output logic        clear_fa,
  output logic        clear_cmp,
  output logic        clear_alu,
  output logic        run_rca,
  output logic        run_fa,
  output logic        run_cmp,
  output logic        run_alu,
  output logic [15:0] pat_count,    // patterns applied in the current session
  output logic        busy,
  output logic        done
);

  typedef enum logic [2:0] {S_IDLE, S_RESET, S_LOAD, S_RUN, S_FIN} state_e;

  state_e state;
  logic   sess_done, budget_out;

  always_comb begin
    unique case (session)
      2'd1:    sess_done = done_rca && done_fa;
      2'd2:    sess_done = done_cmp;
      2'd3:    sess_done = done_alu;
      default: sess_done = 1'b1;
    endcase
    budget_out = (pat_count >= 16'(MAX_PAT));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      session   <= 2'd0;
      pat_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_RESET;
          session <= 2'd1;
        end
        S_RESET: begin
          state     <= S_LOAD;
          pat_count <= '0;
        end
        S_LOAD: state <= S_RUN;
        S_RUN: begin
          if (sess_done || budget_out) begin
            if (session == 2'd3) begin
              state   <= S_FIN;
              session <= 2'd0;
            end else begin
              state   <= S_RESET;
              session <= session + 2'd1;
            end
          end else begin
            pat_count <= pat_count + 16'd1;
          end
        end
        S_FIN: if (!start) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    logic running, hold_scan;
    running   = (state == S_RUN) && !sess_done && !budget_out;
    hold_scan = (state == S_IDLE || state == S_FIN) && scan_en;
    mode1 = hold_scan ? BILBO_SCAN : BILBO_LOAD;
    zsel1 = Z_HOLD;
    mode2 = mode1;
    zsel2 = Z_HOLD;
    unique case (state)
      S_RESET: begin
        mode1 = BILBO_RESET;
        mode2 = (session == 2'd1) ? BILBO_RESET : BILBO_LOAD;
      end
      S_LOAD: begin
        zsel1 = Z_SEED;
        if (session == 2'd1) zsel2 = Z_SEED;
      end
      S_RUN: begin
        if (running) begin
          mode1 = BILBO_PRPG;
          zsel1 = Z_ZERO;
          if (session == 2'd1) begin
            mode2 = BILBO_PRPG;
            zsel2 = Z_ZERO;
          end
        end
      end
      default: ;
    endcase
    clear_rca = (state == S_RESET) && (session == 2'd1);
    clear_fa  = clear_rca;
    clear_cmp = (state == S_RESET) && (session == 2'd2);
    clear_alu = (state == S_RESET) && (session == 2'd3);
    run_rca   = running && (session == 2'd1);
    run_fa    = run_rca;
    run_cmp   = running && (session == 2'd2);
    run_alu   = running && (session == 2'd3);
    busy      = (state != S_IDLE) && (state != S_FIN);
    done      = (state == S_FIN);
  end

endmodule
