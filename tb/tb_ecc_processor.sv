// Self-checking test of ecc_processor on the NIST B-163 curve
// (y^2 + xy = x^3 + x^2 + b, generator G). Expected points k x G were
// computed beforehand by an independent affine double-and-add model. Covers:
// small keys, a 24-bit key, a full-length key, k = n-1 (its ladder ends with
// Z2 = 0, result -G), k = n (Z1 = 0, point at infinity), k = 0 and x = 0
// (early exit). Also checks that the ladder runs exactly bitlength(k)-1
// steps and that both key-bit branches are taken.
module tb_ecc_processor;
  localparam int unsigned M = 163;
  localparam logic [M-1:0] POLY = M'('hC9);
  localparam logic [M-1:0] B  = 163'h20a601907b8c953ca1481eb10512f78744a3205fd;
  localparam logic [M-1:0] GX = 163'h3f0eba16286a2d57ea0991168d4994637e8343e36;
  localparam logic [M-1:0] GY = 163'h0d51fbc6c71a0094fa2cdd545b11c5c0c797324f1;
  localparam logic [M-1:0] N  = 163'h40000000000000000000292fe77e70c12a4234c33;

  logic clk = 0, rst_n = 0, start = 0, busy, done, ladder_step, ladder_bit;
  logic [M-1:0] k, x, y, b, qx, qy;
  int checks = 0, failures = 0, steps, ones, zeros;

  always #5 clk = ~clk;

  ecc_processor #(.M(M), .POLY(POLY)) dut (.*);

  always @(posedge clk) if (ladder_step) begin
    steps++;
    if (ladder_bit) ones++; else zeros++;
  end

  function automatic int bitlen(logic [M-1:0] v);
    for (int i = int'(M) - 1; i >= 0; i--) if (v[i]) return i + 1;
    return 0;
  endfunction

  task automatic run(logic [M-1:0] kk, logic [M-1:0] xx, logic [M-1:0] yy,
                     logic [M-1:0] ex, logic [M-1:0] ey);
    int exp_steps;
    @(negedge clk);
    k = kk; x = xx; y = yy; b = B; start = 1; steps = 0;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks += 2;
    if (qx !== ex || qy !== ey) begin
      failures++;
      $display("FAIL k=%h got (%h,%h) exp (%h,%h)", kk, qx, qy, ex, ey);
    end
    exp_steps = (kk == '0 || xx == '0) ? 0 : bitlen(kk) - 1;
    if (steps != exp_steps) begin
      failures++;
      $display("FAIL k=%h ladder steps %0d exp %0d", kk, steps, exp_steps);
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k = '0; x = '0; y = '0; b = '0; ones = 0; zeros = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(M'(1), GX, GY, GX, GY);
    run(M'(2), GX, GY, 163'h1aeb33fed9c49e0200a0c561ea66d5ab85bd4c2d4,
                       163'h530608192cd47d0c24c20076475fd625cc82895e8);
    run(M'(3), GX, GY, 163'h634000577f86aa315009d6f9b906691f6edd691fe,
                       163'h401a3de0d6c2ec014e6fba5653587bd45dc2230be);
    run(M'('h1234567), GX, GY, 163'h3308f5d2b6ae087b8b3bb76641618bb3b06c88e40,
                               163'h7de3eb2f9596cda08516e04134cffac9d4bcefc8e);
    run(163'h2f3c4d5e6f708192a3b4c5d6e7f8091a2b3c4d5e6, GX, GY,
        163'h193ef3c82fba367487f319e7527c9fd232f24d1af,
        163'h0ce85a1ed1d12dfab96616b6d1e38062277d131a1);
    run(N - 1, GX, GY, GX, GX ^ GY);       // -G
    run(N, GX, GY, '0, '0);                // infinity
    run('0, GX, GY, '0, '0);               // k = 0
    run(M'(5), '0, GY, '0, '0);            // x = 0
    checks++;
    if (ones == 0 || zeros == 0) begin failures++; $display("FAIL branch coverage %0d/%0d", ones, zeros); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
