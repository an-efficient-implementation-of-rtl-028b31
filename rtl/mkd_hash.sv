// MKD hash: a sponge built on the 1600-bit mkd_permutation.
// Absorbing: each RATE-bit message block is XORed into the first RATE bits
// of the state and the permutation is applied. Squeezing: the first RATE
// bits of the state are the hash output (rate_out), and a squeeze command
// permutes again to produce the next RATE bits.
// Interface: cmd_valid/cmd_ready handshake with cmd (HC_INIT, HC_ABSORB,
// HC_SQUEEZE) and blk (used by HC_ABSORB); done pulses when the command has
// finished and rate_out is valid. The caller pads the message.
// Timing: HC_INIT completes in 1 cycle, HC_ABSORB and HC_SQUEEZE in 25
// (24 rounds plus the load); cmd_ready is low meanwhile.
// Following the document: m-bit blocks XORed into the first m state bits,
// permutation applications in between, first m bits returned as the hash,
// m = RATE = 163 by default (the processor's field size). Own choices: the
// command interface and leaving the padding to the caller.
module mkd_hash
  import ehsp_pkg::*;
#(
  parameter int unsigned RATE = 163
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  hash_cmd_e       cmd,
  input  logic [RATE-1:0] blk,
  output logic [RATE-1:0] rate_out,
  output logic            done
);
  logic [1599:0] st, st_in;
  logic          p_load, p_start, p_busy, p_done, init_done;

  always_comb begin
    st_in   = st;
    p_load  = 1'b0;
    p_start = 1'b0;
    if (cmd_valid && cmd_ready) begin
      unique case (cmd)
        HC_INIT:    begin st_in = '0; p_load = 1'b1; end
        HC_ABSORB:  begin st_in[RATE-1:0] = st[RATE-1:0] ^ blk; p_start = 1'b1; end
        default:    p_start = 1'b1;
      endcase
    end
  end

  mkd_permutation u_perm (
    .clk, .rst_n, .load(p_load), .start(p_start), .state_in(st_in),
    .state_out(st), .busy(p_busy), .done(p_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) init_done <= 1'b0;
    else        init_done <= p_load;
  end

  assign cmd_ready = !p_busy && !init_done;
  assign done      = p_done || init_done;
  assign rate_out  = st[RATE-1:0];

  a_rate_fits: assert property (@(posedge clk) RATE > 0 && RATE < 1600);
endmodule
