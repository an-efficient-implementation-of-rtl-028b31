// Hybrid signcryption processor (EHSP) over GF(2^M).
// A public-key engine and a symmetric engine are chained by a sequencer:
//   1. ECC phase: the ECC processor computes S = k x P from the sender's
//      secret scalar k and the receiver's public point P = (px, py).
//   2. Key encapsulation: the MKD hash sponge is cleared and absorbs S.x and
//      S.y; its state is now the session key, and the first M state bits are
//      exposed as key_out (the key check value sent with the message).
//   3. Data encapsulation: every M-bit message block m_i leaves as the
//      ciphertext block c_i = m_i XOR rate, where rate is the first M bits of
//      the sponge state, and m_i is then absorbed (duplex mode), so each
//      ciphertext block depends on the key and on all earlier plaintext.
//   4. Signature: after the last block the sponge absorbs the block 1
//      (end marker) and the first M state bits become the tag.
// Interface: start pulse with k, px, py, b valid and held until done;
// message blocks on a valid/ready stream (msg_last marks the last block);
// each ciphertext block appears on ct_data with a one-cycle ct_valid pulse;
// done pulses with tag valid. sx/sy hold the shared point after phase 1.
// Timing: phase 1 takes about 193,000 cycles for a 163-bit key at M=163,
// phase 2 about 52 cycles, and every message block and the tag 26 cycles.
// Following the document: the MKD hash as key encapsulation, the ECC
// processor feeding it, a signature over the data. Own choices: the exact
// chaining (S feeds the hash, duplex encryption, end-marker tag), which the
// document leaves open.
module ehsp_top
  import ehsp_pkg::*;
#(
  parameter int unsigned  M    = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] px,
  input  logic [M-1:0] py,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic [M-1:0] sx,
  output logic [M-1:0] sy,
  output logic [M-1:0] key_out,
  input  logic         msg_valid,
  output logic         msg_ready,
  input  logic [M-1:0] msg_data,
  input  logic         msg_last,
  output logic         ct_valid,
  output logic [M-1:0] ct_data,
  output logic [M-1:0] tag,
  output logic         done,
  output logic         ladder_step,
  output logic         ladder_bit
);
  typedef enum logic [3:0] {
    T_IDLE, T_ECC, T_HINIT, T_ABS_X, T_ABS_Y, T_MSG, T_MSG_WAIT, T_FIN
  } top_state_e;

  top_state_e   st_q;
  logic         ecc_start, ecc_busy, ecc_done;
  logic         h_valid, h_ready, h_done;
  hash_cmd_e    h_cmd;
  logic [M-1:0] h_blk, rate;
  logic         last_q, issued_q;

  ecc_processor #(.M(M), .POLY(POLY)) u_ecc (
    .clk, .rst_n, .start(ecc_start), .k, .x(px), .y(py), .b,
    .qx(sx), .qy(sy), .busy(ecc_busy), .done(ecc_done),
    .ladder_step, .ladder_bit
  );

  mkd_hash #(.RATE(M)) u_hash (
    .clk, .rst_n, .cmd_valid(h_valid), .cmd_ready(h_ready), .cmd(h_cmd),
    .blk(h_blk), .rate_out(rate), .done(h_done)
  );

  assign ecc_start = (st_q == T_IDLE) && start;
  assign busy      = (st_q != T_IDLE);
  assign msg_ready = (st_q == T_MSG) && h_ready;
  assign ct_data   = msg_data ^ rate;
  assign ct_valid  = msg_valid && msg_ready;

  // Hash commands: one per phase, issued once and then waited for.
  always_comb begin
    h_valid = 1'b0;
    h_cmd   = HC_ABSORB;
    h_blk   = '0;
    unique case (st_q)
      T_HINIT: begin h_valid = !issued_q; h_cmd = HC_INIT; end
      T_ABS_X: begin h_valid = !issued_q; h_blk = sx;      end
      T_ABS_Y: begin h_valid = !issued_q; h_blk = sy;      end
      T_MSG:   begin h_valid = msg_valid; h_blk = msg_data; end
      T_FIN:   begin h_valid = !issued_q; h_blk = M'(1);   end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= T_IDLE;
      last_q   <= 1'b0;
      issued_q <= 1'b0;
      key_out  <= '0;
      tag      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (h_valid && h_ready) issued_q <= 1'b1;
      unique case (st_q)
        T_IDLE:  if (start) st_q <= T_ECC;
        T_ECC:   if (ecc_done) begin st_q <= T_HINIT; issued_q <= 1'b0; end
        T_HINIT: if (h_done) begin st_q <= T_ABS_X; issued_q <= 1'b0; end
        T_ABS_X: if (h_done) begin st_q <= T_ABS_Y; issued_q <= 1'b0; end
        T_ABS_Y: if (h_done) begin
          st_q     <= T_MSG;
          key_out  <= rate;
          issued_q <= 1'b0;
        end
        T_MSG: if (msg_valid && msg_ready) begin
          last_q <= msg_last;
          st_q   <= T_MSG_WAIT;
        end
        T_MSG_WAIT: if (h_done) begin
          st_q     <= last_q ? T_FIN : T_MSG;
          issued_q <= 1'b0;
        end
        T_FIN: if (h_done) begin
          tag  <= rate;
          done <= 1'b1;
          st_q <= T_IDLE;
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

  a_ecc_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n)
    ecc_start |-> !ecc_busy);
endmodule
