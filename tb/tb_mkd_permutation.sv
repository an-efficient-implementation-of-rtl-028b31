// Self-checking test of mkd_permutation. Reference values are published
// Keccak-f[1600] results: the permutation of the all-zero state (all 25
// lanes, then lane 0 of a second application), and the SHA3-256 digest of
// "abc" obtained by permuting the padded one-block state. Also checks the
// latency (done 25 cycles after start: load plus 24 rounds) and that load does not permute.
module tb_mkd_permutation;
  localparam logic [1599:0] ZERO_OUT = 1600'heaf1ff7b5ceca24975f644e97f30a13b16f53526e70465c21841f924a2c509e4940c7922ae3a26148c3ee88a1ccf32c8b87c5a554fd00ecb613670957bc4661164befef28cc970f205e5635a21d9ae6101f22f1a11a5569f43b831cd0347c82681a57c16dbcf555fa9a6e6260d712103eb5aa93f2317d63530935ab7d08ffc64ad30a6f71b19059c8c5bda0cd6192e7690fee5a0a44647c4ff97a42d7f8e6fd48b284e056253d057bd1547306f80494dd598261ea65aa9ee84d5ccf933c0478af1258f7940e1dde7;
  localparam logic [255:0] SHA3_ABC = 256'h3215431145e2bf465b529d3e6e085f85bd90d36b2d175c04b225e24fa75d983a;

  logic clk = 0, rst_n = 0, load = 0, start = 0, busy, done;
  logic [1599:0] state_in, state_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mkd_permutation dut (.*);

  task automatic permute(logic [1599:0] s);
    int cyc;
    @(negedge clk);
    state_in = s; start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 25) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1599:0] s;
    state_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load only
    @(negedge clk);
    state_in = {1600{1'b1}}; load = 1;
    @(negedge clk);
    load = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (state_out !== {1600{1'b1}} || busy) begin failures++; $display("FAIL load"); end
    // zero state
    permute('0);
    checks++;
    if (state_out !== ZERO_OUT) begin failures++; $display("FAIL zero state: lane0 %h", state_out[63:0]); end
    permute(state_out);
    checks++;
    if (state_out[63:0] !== 64'h2d5c954df96ecb3c) begin failures++; $display("FAIL second application"); end
    // SHA3-256("abc")
    s = '0;
    s[31:0] = 32'h06636261;
    s[1087] = 1'b1;
    permute(s);
    checks++;
    if (state_out[255:0] !== SHA3_ABC) begin failures++; $display("FAIL sha3(abc) %h", state_out[255:0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
