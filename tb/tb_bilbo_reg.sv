// tb_bilbo_reg: checks all four BILBO modes.
// A 3-bit register (the width of the full adder's pattern generator) is run
// in PRPG mode from the all-zero reset state and must step through the
// hand-worked sequence 000 100 110 011 101 010 001 and repeat after 7
// clocks. An 8-bit register is checked in reset, scan (serial in at the top,
// out at Q_0), load, PRPG (all 255 non-lock-up states visited once per
// period) and MISR mode (random inputs compacted, compared with a software
// signature register), one clock per operation.
module tb_bilbo_reg;
  import bist_pkg::*;

  logic       clk = 1'b0;
  logic       b1, b2, si;
  logic [2:0] z3, q3;
  logic [7:0] z8, q8, model;
  logic       so3, so8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bilbo_reg #(.W(3)) dut3 (.clk(clk), .b1(b1), .b2(b2), .si(si), .z(z3), .q(q3), .so(so3));
  bilbo_reg #(.W(8)) dut8 (.clk(clk), .b1(b1), .b2(b2), .si(si), .z(z8), .q(q8), .so(so8));

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic step(bilbo_mode_e m);
    {b1, b2} = m;
    @(posedge clk);
    #1;
  endtask

  // software signature register: right shift, XNOR feedback of Q0,Q2,Q3,Q4
  function automatic logic [7:0] misr_next(logic [7:0] s, logic [7:0] in);
    logic fb;
    fb = ~(s[0] ^ s[2] ^ s[3] ^ s[4]);
    return {fb, s[7:1]} ^ in;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] seq3 [7] = '{3'b000, 3'b100, 3'b110, 3'b011, 3'b101, 3'b010, 3'b001};
    logic [255:0] seen;
    si = 1'b0; z3 = '0; z8 = '0;
    // RESET
    step(BILBO_RESET);
    check("reset 3", 8'(q3), 8'h0);
    check("reset 8", q8, 8'h0);
    // PRPG on the 3-bit register: exact sequence and period 7
    for (int i = 0; i < 14; i++) begin
      check($sformatf("prpg3 step %0d", i), 8'(q3), 8'(seq3[i % 7]));
      step(BILBO_PRPG);
    end
    // LOAD
    z8 = 8'hA5; z3 = 3'b010;
    step(BILBO_LOAD);
    check("load 8", q8, 8'hA5);
    check("load 3", 8'(q3), 8'h2);
    // SCAN: shift in 8 bits, watch them leave at Q_0
    begin
      logic [7:0] sin = 8'h3C;
      logic [7:0] got = '0;
      for (int i = 0; i < 8; i++) begin
        si = sin[i];
        got[i] = so8;            // old contents come out first, Q_0 first
        step(BILBO_SCAN);
      end
      check("scan out", got, 8'hA5);
      check("scan in", q8, 8'h3C);
    end
    // PRPG on 8 bits from reset: 255 distinct states, period 255
    step(BILBO_RESET);
    z8 = '0;
    seen = '0;
    for (int i = 0; i < 255; i++) begin
      checks++;
      if (seen[q8]) begin
        failures++;
        $display("FAIL prpg8 state %h repeated at step %0d", q8, i);
      end
      seen[q8] = 1'b1;
      step(BILBO_PRPG);
    end
    checks++;
    if (seen[8'hFF] || !(&seen[254:0])) begin
      failures++;
      $display("FAIL prpg8 did not visit every non-lock-up state");
    end
    check("prpg8 period", q8, 8'h00);
    // MISR: compact random inputs
    z8 = 8'h00;
    step(BILBO_RESET);
    model = '0;
    for (int i = 0; i < 40; i++) begin
      z8 = 8'($urandom);
      model = misr_next(model, z8);
      step(BILBO_PRPG);
      check($sformatf("misr step %0d", i), q8, model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
