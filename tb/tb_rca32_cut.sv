// tb_rca32_cut: 32-bit ripple-carry adder under test. Fault free, random and
// corner operands are compared with a + b. With each of the five faults
// injected, random operands are compared with an arithmetic model of the
// fault, and one directed vector per fault checks a hand-worked result.
module tb_rca32_cut;
  import bist_ref_pkg::*;

  logic [31:0] a, b, sum;
  logic        cout;
  logic [4:0]  fault_en;
  int checks = 0, failures = 0;

  rca32_cut dut (.a(a), .b(b), .fault_en(fault_en), .sum(sum), .cout(cout));

  task automatic check(string what, logic [32:0] got, logic [32:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h expected %h", what, a, b, got, exp);
    end
  endtask

  task automatic apply(int f, logic [31:0] x, logic [31:0] y, logic [32:0] exp);
    fault_en = (f < 0) ? 5'b0 : 5'(1 << f);
    a = x; b = y; #1;
    check($sformatf("directed fault %0d", f), {cout, sum}, exp);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault_en = '0;
    for (int i = 0; i < 300; i++) begin
      a = $urandom; b = $urandom;
      if (i == 0) begin a = '1; b = 32'd1; end
      if (i == 1) begin a = '1; b = '1; end
      #1;
      check("fault free", {cout, sum}, {1'b0, a} + {1'b0, b});
    end
    for (int f = 0; f < 5; f++) begin
      fault_en = 5'(1 << f);
      for (int i = 0; i < 100; i++) begin
        a = $urandom; b = $urandom; #1;
        check($sformatf("fault %0d", f), {cout, sum}, ref_rca(a, b, f));
      end
    end
    apply(0, 32'h0, 32'h0, 33'h2);
    apply(1, 32'h0, 32'h0, 33'h20);
    apply(2, 32'h4, 32'h4, 33'h0);
    apply(3, 32'h1, 32'h0, 33'h0);
    apply(4, 32'hFFFF_FFFF, 32'h1, 33'h0);
    apply(-1, 32'hFFFF_FFFF, 32'h1, 33'h1_0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
