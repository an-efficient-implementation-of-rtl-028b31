// Self-checking test of mkd_hash with its default 163-bit rate: clear,
// absorb three blocks, squeeze once; after each command the first 163 state
// bits are compared with a Keccak-f[1600] sponge model computed beforehand.
// Also checks command latencies (1 cycle for init, 25 for absorb/squeeze
// counted from the accepting edge to done) and that cmd_ready drops while
// the permutation runs.
module tb_mkd_hash;
  import ehsp_pkg::*;
  localparam int unsigned RATE = 163;
  logic clk = 0, rst_n = 0, cmd_valid = 0, cmd_ready, done;
  hash_cmd_e cmd;
  logic [RATE-1:0] blk, rate_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mkd_hash #(.RATE(RATE)) dut (.*);

  task automatic issue(hash_cmd_e c, logic [RATE-1:0] v, logic [RATE-1:0] exp, int lat);
    int cyc;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; blk = v; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; cyc = 1;
    if (c != HC_INIT) begin
      checks++;
      if (cmd_ready) begin failures++; $display("FAIL ready high while busy"); end
    end
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (rate_out !== exp) begin failures++; $display("FAIL %s got %h exp %h", c.name(), rate_out, exp); end
    if (cyc != lat) begin failures++; $display("FAIL %s latency %0d exp %0d", c.name(), cyc, lat); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = HC_INIT; blk = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    issue(HC_ABSORB, 163'h1, 163'h018f27a4270fec06ceb0b06c4e2a944396f0b13c6, 25);   // dirty the state first
    issue(HC_INIT, '0, '0, 1);
    issue(HC_ABSORB, 163'h5a5a5a5a5a5a5a5a5a5a5a5a5a5a5a5a5a5a5a5a5,
                     163'h165c2571b3bbb8679fccf3726e7320334142a46df, 25);
    issue(HC_ABSORB, 163'h123456789abcdef0123456789abcdef0123456789,
                     163'h495856da4ca77da627e2bcc585276d9c99faab3aa, 25);
    issue(HC_ABSORB, 163'h1, 163'h7bbacd8a05459e4f48966cda749543702d3892d9b, 25);
    issue(HC_SQUEEZE, '0, 163'h138cacd9ae0ce387db67253e1646a349104441089, 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
