// tb_full_adder_cut: exhaustive test of the 1-bit full adder under test.
// All 8 input combinations are applied fault free and with each of the two
// faults injected; results are compared with a reference that adds the bits
// arithmetically (fault free) or forces the faulty node (faulty). Two
// directed vectors check the intended effect of each fault.
module tb_full_adder_cut;
  import bist_ref_pkg::*;

  logic       a, b, cin, sum, carry;
  logic [1:0] fault_en;
  int checks = 0, failures = 0;

  full_adder_cut dut (.a(a), .b(b), .cin(cin), .fault_en(fault_en), .sum(sum), .carry(carry));

  task automatic check(string what, logic [1:0] got, logic [1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = -1; f < 2; f++) begin
      fault_en = (f < 0) ? 2'b00 : 2'(1 << f);
      for (int p = 0; p < 8; p++) begin
        {a, b, cin} = 3'(p);
        #1;
        check($sformatf("fault %0d pattern %0d", f, p), {sum, carry}, ref_fa(3'(p), f));
      end
    end
    // carry stuck-at-1 shows on 0+0+0
    fault_en = 2'b01; {a, b, cin} = 3'b000; #1;
    check("carry s-a-1 directed", {sum, carry}, 2'b01);
    // half-sum stuck-at-0 turns 1+0+0 into 0
    fault_en = 2'b10; {a, b, cin} = 3'b100; #1;
    check("half-sum s-a-0 directed", {sum, carry}, 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
