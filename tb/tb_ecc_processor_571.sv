// Workload test: the ECC processor configured for the 571-bit field
// (f(x) = x^571 + x^10 + x^5 + x^2 + 1) on the Koblitz curve
// y^2 + xy = x^3 + 1, with a random curve point and a full-length 571-bit
// scalar. The expected result was computed beforehand by an independent
// affine double-and-add model. Also checks that the ladder runs 569 steps
// and reports the cycle count of one scalar multiplication.
module tb_ecc_processor_571;
  localparam int unsigned M = 571;
  localparam logic [M-1:0] POLY = M'('h425);
  localparam logic [M-1:0] PX = 571'h38b61cff409cd61a3eb6a239ee66dc5080f29d6cf0c175a9bafd2fb7d382de214ed3dcba92d8fdf5c76f29143862081f9ed958dc3f155f705c4375f8be69a5f552197f72eafa40c;
  localparam logic [M-1:0] PY = 571'h6ae94ae23a09d285dba5511d0205631a02e090cbe8bdf1d97a072f287a6cf06234b2dde36a01623b917c1bb7af62d56cbeec41eed011bd908c729f060c07152bbab9c6ed86384f4;
  localparam logic [M-1:0] K  = 571'h2cbd5e24f926460789b67a8992bd2d442ff8635e739e4ead50bbfb6f95c4f170a88fca20ccecaeac680ccde64293bf063b545120a1e77900d8f817b5304943bf29a42f847ea101d;
  localparam logic [M-1:0] QX = 571'h5c08dce95c98aa2e244571489ae9b3ec725f90a64b99b7036b55a072470442e4168ada879486e42e1e0be769e590b00a54e55065718a368590c726f44ec4dc38af66a0a4c46b528;
  localparam logic [M-1:0] QY = 571'h4e7c8e70e0e2ef12b7e4163571692915ca393c36e199d61f8e7ef7bc944ff1b21617d0827cb8cccda5a4832b6e7e110cefba8c87142dcd83d83b4ce4314f4fd4e1ca5711d569483;

  logic clk = 0, rst_n = 0, start = 0, busy, done, ladder_step, ladder_bit;
  logic [M-1:0] k, x, y, b, qx, qy;
  int checks = 0, failures = 0, steps = 0, cycles = 0;

  always #5 clk = ~clk;

  ecc_processor #(.M(M), .POLY(POLY)) dut (.*);

  always @(posedge clk) begin
    if (ladder_step) steps++;
    if (busy) cycles++;
  end

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k = '0; x = '0; y = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    k = K; x = PX; y = PY; b = M'(1); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    checks += 2;
    if (qx !== QX || qy !== QY) begin failures++; $display("FAIL result (%h,%h)", qx, qy); end
    if (steps != 569) begin failures++; $display("FAIL %0d ladder steps", steps); end
    $display("INFO one 571-bit scalar multiplication: %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
