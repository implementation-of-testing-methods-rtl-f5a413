// bist_ref_pkg: reference models for the testbenches.
//
// ref_resp(cut, pattern, f) returns the response of a circuit under test to
// a pattern with fault f injected (f = -1: fault free), packed like
// cut_unit's response. Fault-free results use plain arithmetic (+, >, ==,
// ALU operators); the adder faults are modelled arithmetically by splitting
// the sum at the faulty carry, the others by forcing bits or terms.
// ref_detect() gives the per-fault detection mask of one pattern and
// ref_cluster() that of a pattern and its single-bit-flip children.
package bist_ref_pkg;

  function automatic logic [32:0] ref_rca(logic [31:0] a, logic [31:0] b, int f);
    logic [32:0] r;
    r = {1'b0, a} + {1'b0, b};
    case (f)
      0: r = {32'(a[31:1]) + 32'(b[31:1]) + 32'd1, a[0] ^ b[0]};
      1: r[5] = 1'b1;
      2: r = {30'(a[31:3]) + 30'(b[31:3]), 3'(a[2:0] + b[2:0])};
      3: r[0] = 1'b0;
      4: r[32] = 1'b0;
      default: ;
    endcase
    return r;
  endfunction

  function automatic logic [1:0] ref_fa(logic [2:0] p, int f);
    logic a, b, c;
    logic [1:0] s;
    {a, b, c} = p;
    s = 2'(a) + 2'(b) + 2'(c);          // {carry, sum}
    case (f)
      0: return {s[0], 1'b1};
      1: return {c, a & b};
      default: return {s[0], s[1]};      // {sum, carry}
    endcase
  endfunction

  function automatic logic [2:0] ref_cmp(logic [31:0] a, logic [31:0] b, int f);
    logic [31:0] gv, lv, ev;
    logic g, l, e;
    if (f < 0) return {a > b, a == b, a < b};
    gv = a & ~b; lv = ~a & b; ev = ~(a ^ b);
    if (f == 0) gv[31] = 1'b1;
    if (f == 1) lv[30] = 1'b1;
    if (f == 2) ev[29] = 1'b1;
    if (f == 4) gv[30] = 1'b0;
    if (f == 5) ev[31] = 1'b0;
    g = 0; l = 0; e = 1;
    for (int i = 31; i >= 0; i--) begin
      if (e && gv[i]) g = 1;
      if (e && lv[i]) l = 1;
      if (!ev[i]) e = 0;
    end
    if (f == 3) e = 1'b1;
    if (f == 6) l = 1'b0;
    return {g, e, l};
  endfunction

  function automatic logic [31:0] ref_alu(logic [31:0] a, logic [31:0] b, logic [2:0] op, int f);
    logic [31:0] y, bb, addv, andv, orv, xorv, norv;
    logic ci;
    bb = (op == 3'd1) ? ~b : b;
    ci = (op == 3'd1);
    addv = a + bb + 32'(ci);
    case (f)
      0: addv = {a[31:2] + bb[31:2] + 30'd1, 2'(a[1:0] + bb[1:0] + 2'(ci))};
      1: addv = {a[31:9] + bb[31:9] + 23'd1, 9'(a[8:0] + bb[8:0] + 9'(ci))};
      8: addv = {a[31:5] + bb[31:5], 5'(a[4:0] + bb[4:0] + 5'(ci))};
      default: ;
    endcase
    andv = a & b; orv = a | b; xorv = a ^ b; norv = ~(a | b);
    if (f == 2) andv[4] = 1'b1;
    if (f == 3) orv[6]  = 1'b1;
    if (f == 4) xorv[3] = 1'b1;
    if (f == 5) norv[7] = 1'b1;
    case (op)
      3'd0, 3'd1: y = addv;
      3'd2: y = andv;
      3'd3: y = orv;
      3'd4: y = xorv;
      3'd5: y = norv;
      3'd6: y = a << 1;
      default: y = a >> 1;
    endcase
    if (f == 6) y[0] = 1'b1;
    if (f == 7) y[31] = 1'b1;
    if (f == 9) y[16] = 1'b0;
    return y;
  endfunction

  // Circuit codes used below: 0 RCA, 1 full adder, 2 comparator, 3 ALU.
  function automatic int ref_nf(int cut);
    case (cut)
      0: return 5;
      1: return 2;
      2: return 7;
      default: return 10;
    endcase
  endfunction

  function automatic logic [32:0] ref_resp(int cut, logic [63:0] p, int f);
    case (cut)
      0: return ref_rca(p[63:32], p[31:0], f);
      1: return 33'(ref_fa(p[2:0], f));
      2: return 33'(ref_cmp(p[63:32], p[31:0], f));
      default: return 33'(ref_alu(p[63:32], p[31:0], p[2:0], f));
    endcase
  endfunction

  function automatic logic [9:0] ref_detect(int cut, logic [63:0] p);
    logic [9:0] d;
    logic [32:0] good;
    d = '0;
    good = ref_resp(cut, p, -1);
    for (int f = 0; f < ref_nf(cut); f++) d[f] = (ref_resp(cut, p, f) != good);
    return d;
  endfunction

  function automatic logic [9:0] ref_cluster(int cut, logic [63:0] p, int w, int nchild);
    logic [9:0] d;
    d = ref_detect(cut, p);
    for (int k = 0; k < nchild; k++) d |= ref_detect(cut, p ^ (64'd1 << (w - 1 - (k % w))));
    return d;
  endfunction

endpackage
