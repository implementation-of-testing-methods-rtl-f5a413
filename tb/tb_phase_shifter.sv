// tb_phase_shifter: child k must be the parent with bit W-1-(k mod W)
// inverted. Checked for the 64-bit generator (an all-zero parent gives the
// one-hot children 8000..., 4000..., 2000..., 1000...) and for the 3-bit one,
// where the fourth child wraps round to the top bit again.
module tb_phase_shifter;
  logic [63:0] p64;
  logic [63:0] c64 [4];
  logic [2:0]  p3;
  logic [2:0]  c3 [4];
  int checks = 0, failures = 0;

  phase_shifter #(.W(64), .NCHILD(4)) u64 (.parent(p64), .child(c64));
  phase_shifter #(.W(3),  .NCHILD(4)) u3  (.parent(p3),  .child(c3));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    p64 = '0; p3 = '0; #1;
    check("zero child 0", c64[0], 64'h8000_0000_0000_0000);
    check("zero child 1", c64[1], 64'h4000_0000_0000_0000);
    check("zero child 2", c64[2], 64'h2000_0000_0000_0000);
    check("zero child 3", c64[3], 64'h1000_0000_0000_0000);
    check("3-bit child 0", 64'(c3[0]), 64'h4);
    check("3-bit child 1", 64'(c3[1]), 64'h2);
    check("3-bit child 2", 64'(c3[2]), 64'h1);
    check("3-bit child 3", 64'(c3[3]), 64'h4);
    for (int i = 0; i < 200; i++) begin
      p64 = {$urandom, $urandom}; p3 = 3'($urandom); #1;
      for (int k = 0; k < 4; k++) begin
        logic [63:0] e;
        e = p64;
        e[63 - k] = ~e[63 - k];
        check($sformatf("random child %0d", k), c64[k], e);
        e = 64'(p3);
        e[2 - (k % 3)] = ~e[2 - (k % 3)];
        check($sformatf("3-bit random child %0d", k), 64'(c3[k]), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
