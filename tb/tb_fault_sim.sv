// tb_fault_sim: the parallel fault simulator for all four circuits.
// Random patterns (and, for the full adder, all 8) are applied to one
// fault_sim per circuit; its fault-free response and per-fault detection
// mask are compared with the reference models. Two hand-worked masks of the
// ripple-carry adder are checked as well: 0+0 exposes only the carry-1 and
// sum-5 stuck-at-1 faults, FFFFFFFF+1 only sum-5, carry-3 and carry-out.
module tb_fault_sim;
  import bist_pkg::*;
  import bist_ref_pkg::*;

  logic [63:0] p;
  logic [32:0] good_rca, good_cmp, good_alu, good_fa;
  logic [4:0]  det_rca;
  logic [1:0]  det_fa;
  logic [6:0]  det_cmp;
  logic [9:0]  det_alu;
  int checks = 0, failures = 0;

  fault_sim #(.CUT(CUT_RCA)) u_rca (.pattern(p),      .good_resp(good_rca), .detect(det_rca));
  fault_sim #(.CUT(CUT_FA))  u_fa  (.pattern(p[2:0]), .good_resp(good_fa),  .detect(det_fa));
  fault_sim #(.CUT(CUT_CMP)) u_cmp (.pattern(p),      .good_resp(good_cmp), .detect(det_cmp));
  fault_sim #(.CUT(CUT_ALU)) u_alu (.pattern(p),      .good_resp(good_alu), .detect(det_alu));

  task automatic check(string what, logic [32:0] got, logic [32:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: pattern %h got %h expected %h", what, p, got, exp);
    end
  endtask

  task automatic check_all();
    check("rca good", good_rca, ref_resp(0, p, -1));
    check("rca detect", 33'(det_rca), 33'(ref_detect(0, p)));
    check("fa good", good_fa, ref_resp(1, p, -1));
    check("fa detect", 33'(det_fa), 33'(ref_detect(1, p)));
    check("cmp good", good_cmp, ref_resp(2, p, -1));
    check("cmp detect", 33'(det_cmp), 33'(ref_detect(2, p)));
    check("alu good", good_alu, ref_resp(3, p, -1));
    check("alu detect", 33'(det_alu), 33'(ref_detect(3, p)));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = '0; #1;
    check("rca 0+0 mask", 33'(det_rca), 33'b00011);
    p = {32'hFFFF_FFFF, 32'h1}; #1;
    check("rca FFFFFFFF+1 mask", 33'(det_rca), 33'b10110);
    for (int i = 0; i < 8; i++) begin
      p = 64'(i); #1;
      check_all();
    end
    for (int i = 0; i < 300; i++) begin
      p = {$urandom, $urandom};
      if (i % 4 == 1) p[31:0] = p[63:32] ^ (32'($urandom % 8) << 28);
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
