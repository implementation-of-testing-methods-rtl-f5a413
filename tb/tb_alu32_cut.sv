// tb_alu32_cut: 32-bit ALU under test. Fault free, every operation is
// checked on random operands against the SystemVerilog operators. With each
// of the ten faults injected, random operands and operations are compared
// with a model of the fault, and one directed vector per fault checks a
// hand-worked result.
module tb_alu32_cut;
  import bist_pkg::*;
  import bist_ref_pkg::*;

  logic [31:0] a, b, y, exp;
  alu_op_e     op;
  logic [9:0]  fault_en;
  int checks = 0, failures = 0;

  alu32_cut dut (.a(a), .b(b), .op(op), .fault_en(fault_en), .y(y));

  task automatic check(string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: op=%0d a=%h b=%h got %h expected %h", what, op, a, b, got, e);
    end
  endtask

  task automatic apply(int f, alu_op_e o, logic [31:0] x, logic [31:0] z, logic [31:0] e);
    fault_en = 10'(1 << f);
    op = o; a = x; b = z; #1;
    check($sformatf("directed fault %0d", f), y, e);
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
    for (int i = 0; i < 400; i++) begin
      a = $urandom; b = $urandom; op = alu_op_e'(i % 8); #1;
      case (op)
        ALU_ADD: exp = a + b;
        ALU_SUB: exp = a - b;
        ALU_AND: exp = a & b;
        ALU_OR:  exp = a | b;
        ALU_XOR: exp = a ^ b;
        ALU_NOR: exp = ~(a | b);
        ALU_SHL: exp = a << 1;
        default: exp = a >> 1;
      endcase
      check("fault free", y, exp);
    end
    for (int f = 0; f < 10; f++) begin
      fault_en = 10'(1 << f);
      for (int i = 0; i < 100; i++) begin
        a = $urandom; b = $urandom; op = alu_op_e'($urandom % 8); #1;
        check($sformatf("fault %0d", f), y, ref_alu(a, b, 3'(op), f));
      end
    end
    apply(0, ALU_ADD, 32'h0, 32'h0, 32'h4);
    apply(1, ALU_ADD, 32'h0, 32'h0, 32'h200);
    apply(2, ALU_AND, 32'h0, 32'h0, 32'h10);
    apply(3, ALU_OR,  32'h0, 32'h0, 32'h40);
    apply(4, ALU_XOR, 32'h0, 32'h0, 32'h8);
    apply(5, ALU_NOR, 32'hFFFF_FFFF, 32'h0, 32'h80);
    apply(6, ALU_AND, 32'h0, 32'h0, 32'h1);
    apply(7, ALU_AND, 32'h0, 32'h0, 32'h8000_0000);
    apply(8, ALU_ADD, 32'h10, 32'h10, 32'h0);
    apply(9, ALU_OR,  32'h1_0000, 32'h0, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
