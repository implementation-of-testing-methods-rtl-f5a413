// tb_mag_comp32_cut: 32-bit magnitude comparator under test. Fault free,
// random operands (and operands equal or differing in one bit) are compared
// with >, == and <. With each of the seven faults injected, random operands
// are compared with a model that forces the faulty term, and one directed
// vector per fault checks a hand-worked {gt, eq, lt}.
module tb_mag_comp32_cut;
  import bist_ref_pkg::*;

  logic [31:0] a, b;
  logic        gt, eq, lt;
  logic [6:0]  fault_en;
  int checks = 0, failures = 0;

  mag_comp32_cut dut (.a(a), .b(b), .fault_en(fault_en), .gt(gt), .eq(eq), .lt(lt));

  task automatic check(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %b expected %b", what, a, b, got, exp);
    end
  endtask

  task automatic apply(int f, logic [31:0] x, logic [31:0] y, logic [2:0] exp);
    fault_en = 7'(1 << f);
    a = x; b = y; #1;
    check($sformatf("directed fault %0d", f), {gt, eq, lt}, exp);
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
      if (i % 3 == 1) b = a;
      if (i % 3 == 2) b = a ^ (32'd1 << ($urandom % 32));
      #1;
      check("fault free", {gt, eq, lt}, {a > b, a == b, a < b});
    end
    for (int f = 0; f < 7; f++) begin
      fault_en = 7'(1 << f);
      for (int i = 0; i < 100; i++) begin
        a = $urandom; b = $urandom;
        if (i % 2 == 1) b = a ^ 32'($urandom % 4) << 28;
        #1;
        check($sformatf("fault %0d", f), {gt, eq, lt}, ref_cmp(a, b, f));
      end
    end
    apply(0, 32'h0, 32'h0, 3'b110);
    apply(1, 32'h0, 32'h0, 3'b011);
    apply(2, 32'h2000_0000, 32'h0, 3'b110);
    apply(3, 32'h1, 32'h0, 3'b110);
    apply(4, 32'h4000_0000, 32'h0, 3'b000);
    apply(5, 32'h0, 32'h0, 3'b000);
    apply(6, 32'h0, 32'h1, 3'b000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
