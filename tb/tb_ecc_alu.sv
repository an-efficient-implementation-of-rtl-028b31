// Self-checking test of ecc_alu at GF(2^163): random ADD, SQR, MOV and MUL
// operations are compared with a shift-and-add reference, and the latency
// is checked (1 cycle for ADD/SQR/MOV, M+2 for MUL).
module tb_ecc_alu;
  import ehsp_pkg::*;
  localparam int unsigned M = 163;
  localparam logic [M-1:0] POLY = M'('hC9);

  logic clk = 0, rst_n = 0, start = 0, done;
  alu_op_e op;
  logic [M-1:0] a, b, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_alu #(.M(M), .POLY(POLY)) dut (.*);

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

  task automatic run(alu_op_e o, logic [M-1:0] x, logic [M-1:0] z);
    int cyc, lat;
    logic [M-1:0] exp;
    @(negedge clk);
    op = o; a = x; b = z; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    unique case (o)
      OP_ADD: begin exp = x ^ z;          lat = 1; end
      OP_SQR: begin exp = ref_mul(x, x);  lat = 1; end
      OP_MOV: begin exp = x;              lat = 1; end
      default: begin exp = ref_mul(x, z); lat = M + 2; end
    endcase
    checks += 2;
    if (y !== exp) begin failures++; $display("FAIL op=%s got %h exp %h", o.name(), y, exp); end
    if (cyc != lat) begin failures++; $display("FAIL op=%s latency %0d exp %0d", o.name(), cyc, lat); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = OP_ADD; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) run(alu_op_e'(i % 4), rnd(), rnd());
    run(OP_MUL, M'(1) << (M - 1), M'(2));   // x^163 = 0xC9
    checks++;
    if (y !== POLY) begin failures++; $display("FAIL reduction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
