// Self-checking test of ecc_control on its own. The memory unit and the
// arithmetic unit are replaced by a behavioural model kept here (an array
// and reference field arithmetic with a fixed 3-cycle latency), so only the
// sequencing is under test. Checks the final point for NIST B-163 keys
// against values from an independent affine model, the number of ladder
// steps and of issued operations (5 + 14 per ladder step + 4 + 2(M-2) + 17
// on the normal path, 2 on the infinity path, 2 on the -P path).
module tb_ecc_control;
  import ehsp_pkg::*;
  localparam int unsigned M = 163;
  localparam logic [M-1:0] POLY = M'('hC9);
  localparam logic [M-1:0] B  = 163'h20a601907b8c953ca1481eb10512f78744a3205fd;
  localparam logic [M-1:0] GX = 163'h3f0eba16286a2d57ea0991168d4994637e8343e36;
  localparam logic [M-1:0] GY = 163'h0d51fbc6c71a0094fa2cdd545b11c5c0c797324f1;
  localparam logic [M-1:0] N  = 163'h40000000000000000000292fe77e70c12a4234c33;

  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] key;
  logic x_zero;
  logic rf_we, rf_rdata_a_zero, alu_start, alu_done, busy, done, ladder_step, ladder_bit;
  reg_e rf_waddr, rf_raddr_a, rf_raddr_b;
  wsel_e rf_wsel;
  alu_op_e alu_op;
  logic [M-1:0] mem [16];
  logic [M-1:0] res, wd;
  int lat, issued, steps;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecc_control #(.M(M)) dut (.*);

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

  assign rf_rdata_a_zero = (mem[rf_raddr_a] == '0);

  // Behavioural arithmetic unit: result after 3 cycles.
  always @(posedge clk) begin
    alu_done <= 1'b0;
    if (alu_start) begin
      issued++;
      unique case (alu_op)
        OP_ADD:  res <= mem[rf_raddr_a] ^ mem[rf_raddr_b];
        OP_SQR:  res <= ref_mul(mem[rf_raddr_a], mem[rf_raddr_a]);
        OP_MUL:  res <= ref_mul(mem[rf_raddr_a], mem[rf_raddr_b]);
        default: res <= mem[rf_raddr_a];
      endcase
      lat <= 3;
    end else if (lat > 0) begin
      lat <= lat - 1;
      if (lat == 1) alu_done <= 1'b1;
    end
    if (ladder_step) steps++;
  end

  // Behavioural memory unit.
  always_comb begin
    unique case (rf_wsel)
      W_X:     wd = GX;
      W_Y:     wd = GY;
      W_B:     wd = B;
      W_ONE:   wd = M'(1);
      default: wd = res;
    endcase
  end
  always @(posedge clk) if (rf_we) mem[rf_waddr] <= wd;

  task automatic run(logic [M-1:0] kk, logic [M-1:0] ex, logic [M-1:0] ey, int exp_ops,
                     int exp_steps);
    @(negedge clk);
    key = kk; x_zero = 1'b0; start = 1; issued = 0; steps = 0;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks += 3;
    if (mem[R_QX] !== ex || mem[R_QY] !== ey) begin
      failures++;
      $display("FAIL k=%h got (%h,%h)", kk, mem[R_QX], mem[R_QY]);
    end
    if (issued != exp_ops) begin failures++; $display("FAIL k=%h ops %0d exp %0d", kk, issued, exp_ops); end
    if (steps != exp_steps) begin
      failures++; $display("FAIL k=%h steps %0d", kk, steps);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = '0; x_zero = 0; lat = 0; alu_done = 0; res = '0;
    for (int i = 0; i < 16; i++) mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(M'(3), 163'h634000577f86aa315009d6f9b906691f6edd691fe,
               163'h401a3de0d6c2ec014e6fba5653587bd45dc2230be, 26 + 2*(M-2) + 14*1, 1);
    run(M'('h1234567), 163'h3308f5d2b6ae087b8b3bb76641618bb3b06c88e40,
                       163'h7de3eb2f9596cda08516e04134cffac9d4bcefc8e, 26 + 2*(M-2) + 14*24, 24);
    run(N - 1, GX, GX ^ GY, 5 + 14*162 + 2, 162);
    run(N, '0, '0, 5 + 14*162 + 2, 162);
    run('0, '0, '0, 2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
