// End-to-end test of ehsp_top at its default parameters (GF(2^163), NIST
// B-163, 163-bit hash rate). Two signcryptions are run:
//   1. a 160-bit sender scalar against the receiver public key
//      P = d_B x G, three message blocks, with the message source pausing
//      (valid low) and with blocks offered while the hash is busy (ready low);
//   2. k = 0, so the shared point is the point at infinity (0,0).
// The shared point, key check value, every ciphertext block and the tag are
// compared with values from an independent model (affine double-and-add and
// a Keccak-f[1600] sponge). Each mechanism must occur at least once: ladder
// steps on 1 and on 0 key bits, source pause, back-pressure, the
// infinity result, ciphertext blocks and tags.
module tb_ehsp_top;
  import ehsp_pkg::*;
  localparam int unsigned M = 163;
  localparam logic [M-1:0] B  = 163'h20a601907b8c953ca1481eb10512f78744a3205fd;
  localparam logic [M-1:0] PX = 163'h66600c0ee2853e7443d21fd0ce8a24702d7248364;
  localparam logic [M-1:0] PY = 163'h4d0e5e83615c235428ce7194a9710d5cff04feb52;

  logic clk = 0, rst_n = 0, start = 0, busy, done, ladder_step, ladder_bit;
  logic [M-1:0] k, px, py, b, sx, sy, key_out, msg_data, ct_data, tag;
  logic msg_valid = 0, msg_ready, msg_last = 0, ct_valid;
  logic [M-1:0] msgs [3];
  logic [M-1:0] exp_ct [3];
  int n_ct;
  int checks = 0, failures = 0;
  int ecc_cycles = 0, total_cycles = 0;
  int c_one = 0, c_zero = 0, c_pause = 0, c_bp = 0, c_inf = 0, c_ct = 0, c_tag = 0;

  always #5 clk = ~clk;

  ehsp_top dut (.*);

  always @(posedge clk) begin
    if (ladder_step) begin
      if (ladder_bit) c_one++; else c_zero++;
    end
    if (msg_valid && !msg_ready && busy) c_bp++;
    if (ct_valid) begin
      c_ct++;
      checks++;
      if (ct_data !== exp_ct[n_ct]) begin
        failures++;
        $display("FAIL ct block %0d got %h exp %h", n_ct, ct_data, exp_ct[n_ct]);
      end
      n_ct++;
    end
    if (done) c_tag++;
    if (dut.u_ecc.busy) ecc_cycles++;
    if (busy) total_cycles++;
  end

  task automatic chk(string what, logic [M-1:0] got, logic [M-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  // Send nblk blocks. Block 0 is offered during the ECC phase and block 1
  // right after block 0 (both meet back-pressure); before block 2 the
  // source pauses for 5 cycles with valid low.
  task automatic send(int nblk);
    for (int i = 0; i < nblk; i++) begin
      if (i == 2) begin
        msg_valid = 0;
        while (msg_ready !== 1'b1) @(negedge clk);
        repeat (5) begin @(negedge clk); c_pause++; end
      end
      msg_data = msgs[i]; msg_last = (i == nblk - 1); msg_valid = 1;
      while (msg_ready !== 1'b1) @(negedge clk);
      @(negedge clk);
    end
    msg_valid = 0;
  endtask

  task automatic go(logic [M-1:0] kk);
    @(negedge clk);
    k = kk; px = PX; py = PY; b = B; start = 1; n_ct = 0;
    @(negedge clk);
    start = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k = '0; px = '0; py = '0; b = '0; msg_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- signcryption 1 ----
    msgs[0] = 163'h48656c6c6f2c207369676e6372797074696f6e21;
    msgs[1] = '0;
    msgs[2] = {M{1'b1}};
    exp_ct[0] = 163'h75466b278472a20335a130b241c0d117084dbcb0a;
    exp_ct[1] = 163'h20d1955867b2297bb0aa2a1bd4dea3eb7288b95f1;
    exp_ct[2] = 163'h2b1a67aab9da023de3f1686ddc80ed55c4855f151;
    go(163'h07123456789abcdef0fedcba98765432100112233);
    fork
      send(3);
      while (!done) @(negedge clk);
    join
    $display("INFO signcryption 1: %0d cycles, of which %0d in the ECC processor", total_cycles, ecc_cycles);
    chk("sx", sx, 163'h203f00ed02db5d57480a15ebfa0e92bdfd244fde7);
    chk("sy", sy, 163'h2a4ffd68e21ee80760ad569be24b46ebcb131d711);
    chk("key", key_out, 163'h71c03de1428060040337465476e746104edb4a52b);
    chk("tag", tag, 163'h0a060230c74e923b6fa84da836b89859cc0b44947);
    checks++;
    if (n_ct != 3) begin failures++; $display("FAIL %0d ciphertext blocks", n_ct); end

    // ---- signcryption 2: k = 0 ----
    msgs[0] = M'('habc);
    exp_ct[0] = 163'h270d76b6c6a332cd07057b56d2d5c954df96ec180;
    go('0);
    fork
      send(1);
      while (!done) @(negedge clk);
    join
    if (sx == '0 && sy == '0) c_inf++;
    chk("sx0", sx, '0);
    chk("sy0", sy, '0);
    chk("key0", key_out, 163'h270d76b6c6a332cd07057b56d2d5c954df96ecb3c);
    chk("tag0", tag, 163'h3d10a58b440fa9f698cec03ee5ec0b56cac3252aa);

    repeat (2) @(negedge clk);
    $display("INFO ladder steps on 1 bits=%0d on 0 bits=%0d source pauses=%0d back-pressure cycles=%0d",
             c_one, c_zero, c_pause, c_bp);
    $display("INFO infinity results=%0d ciphertext blocks=%0d tags=%0d", c_inf, c_ct, c_tag);
    if (c_one == 0)   begin failures++; $display("FAIL no ladder step on a 1 bit"); end
    if (c_zero == 0)  begin failures++; $display("FAIL no ladder step on a 0 bit"); end
    if (c_pause == 0) begin failures++; $display("FAIL no source pause"); end
    if (c_bp == 0)    begin failures++; $display("FAIL no back-pressure"); end
    if (c_inf == 0)   begin failures++; $display("FAIL no infinity result"); end
    if (c_ct != 4)    begin failures++; $display("FAIL %0d ciphertext blocks in all", c_ct); end
    if (c_tag != 2)   begin failures++; $display("FAIL %0d tags", c_tag); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
