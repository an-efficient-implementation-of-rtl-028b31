// Self-checking test of ecc_regfile: after reset every slot reads 0; then
// random writes and simultaneous reads on both ports are compared with a
// model array kept here.
module tb_ecc_regfile;
  localparam int unsigned M = 163, REGS = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr, raddr_a, raddr_b;
  logic [M-1:0] wdata, rdata_a, rdata_b;
  logic [M-1:0] model [REGS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_regfile #(.M(M), .REGS(REGS)) dut (.*);

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] v;
    for (int i = 0; i < 6; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = '0; raddr_a = '0; raddr_b = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(REGS); i++) begin
      model[i] = '0;
      raddr_a = 4'(i); raddr_b = 4'(REGS - 1 - i);
      #1;
      checks++;
      if (rdata_a !== '0 || rdata_b !== '0) begin failures++; $display("FAIL reset slot %0d", i); end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = ($urandom % 3) != 0;
      waddr = 4'($urandom);
      wdata = rnd();
      raddr_a = 4'($urandom);
      raddr_b = 4'($urandom);
      #1;
      checks += 2;
      if (rdata_a !== model[raddr_a]) begin failures++; $display("FAIL port a slot %0d", raddr_a); end
      if (rdata_b !== model[raddr_b]) begin failures++; $display("FAIL port b slot %0d", raddr_b); end
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
