// Self-checking test of the flexible multiplier at its default size
// (MMAX = 571), switching the field at run time between GF(2^8) (AES
// polynomial, known product 0x53*0xCA = 1), GF(2^163), GF(2^233) (trinomial)
// and GF(2^571). Products are compared with an LSB-first shift-and-add
// reference; the latency start -> done must be m+1 cycles.
module tb_gf2m_flex_multiplier;
  localparam int unsigned MMAX = 571;
  localparam int unsigned MW = $clog2(MMAX + 1);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [MW-1:0]   m;
  logic [MMAX-1:0] poly, a, b, c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gf2m_flex_multiplier #(.MMAX(MMAX)) dut (.*);

  function automatic logic [MMAX-1:0] ref_mul(logic [MMAX-1:0] x, logic [MMAX-1:0] z,
                                              int mm, logic [MMAX-1:0] p);
    logic [MMAX-1:0] r, s;
    logic cr;
    r = '0; s = x;
    for (int i = 0; i < mm; i++) begin
      if (z[i]) r ^= s;
      cr = s[mm-1];
      s[mm-1] = 1'b0;
      s = s << 1;
      if (cr) s ^= p;
    end
    return r;
  endfunction

  function automatic logic [MMAX-1:0] rnd(int mm);
    logic [MMAX-1:0] v;
    for (int i = 0; i < 18; i++) v[i*32 +: 32] = $urandom;
    for (int i = 0; i < int'(MMAX); i++) if (i >= mm) v[i] = 1'b0;
    return v;
  endfunction

  task automatic run(int mm, logic [MMAX-1:0] p, logic [MMAX-1:0] x, logic [MMAX-1:0] z);
    int cyc;
    logic [MMAX-1:0] exp;
    @(negedge clk);
    m = MW'(mm); poly = p; a = x; b = z; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp = ref_mul(x, z, mm, p);
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL m=%0d got %h exp %h", mm, c, exp);
    end
    checks++;
    if (cyc != mm + 1) begin
      failures++;
      $display("FAIL m=%0d latency %0d expected %0d", mm, cyc, mm + 1);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = MW'(8); poly = '0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // GF(2^8), x^8+x^4+x^3+x+1: 0x53 * 0xCA = 0x01
    run(8, MMAX'('h1B), MMAX'('h53), MMAX'('hCA));
    checks++;
    if (c[7:0] !== 8'h01) begin failures++; $display("FAIL AES product %h", c[7:0]); end
    for (int i = 0; i < 10; i++) run(8, MMAX'('h1B), rnd(8), rnd(8));
    for (int i = 0; i < 10; i++) run(163, MMAX'('hC9), rnd(163), rnd(163));
    for (int i = 0; i < 5; i++)  run(233, (MMAX'(1) << 74) | MMAX'(1), rnd(233), rnd(233));
    for (int i = 0; i < 5; i++)  run(571, MMAX'('h425), rnd(571), rnd(571));
    // x^570 * x in GF(2^571) = reduction polynomial's low part
    run(571, MMAX'('h425), MMAX'(1) << 570, MMAX'(2));
    checks++;
    if (c !== MMAX'('h425)) begin failures++; $display("FAIL x^571 reduction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
