// Self-checking test of gf2m_squarer at the B-163 field: random and edge
// inputs are squared and compared with a shift-and-add reference product
// a*a mod f(x) computed here, bit by bit.
module tb_gf2m_squarer;
  localparam int unsigned M = 163;
  localparam logic [M-1:0] POLY = M'('hC9);

  logic [M-1:0] a, y;
  int checks = 0, failures = 0;

  gf2m_squarer #(.M(M), .POLY(POLY)) dut (.a(a), .y(y));

  function automatic logic [M-1:0] ref_mul(logic [M-1:0] x, logic [M-1:0] z);
    logic [M-1:0] r, s;
    logic c;
    r = '0; s = x;
    for (int i = 0; i < int'(M); i++) begin
      if (z[i]) r ^= s;
      c = s[M-1];
      s = s << 1;
      if (c) s ^= POLY;
    end
    return r;
  endfunction

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic check(logic [M-1:0] v);
    logic [M-1:0] exp;
    a = v;
    #1;
    exp = ref_mul(v, v);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL a=%h got %h exp %h", v, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check(M'(1));
    check({1'b1, {(M-1){1'b0}}});   // x^162 -> needs reduction
    check('1);
    for (int i = 0; i < 200; i++) check(rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
