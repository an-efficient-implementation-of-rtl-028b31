// Iterative MKD hash permutation: the 1600-bit state register and a round
// counter around one mkd_round instance, one round per clock, ROUNDS rounds.
// load writes state_in into the state without permuting; start writes
// state_in and then runs the rounds on it. state_out is the state register.
// Interface: load/start pulses (accepted when not busy); done pulses for one
// cycle when the last round has been written.
// Timing: the accepting clock edge loads the state, the next ROUNDS edges
// apply one round each, and done is high in the cycle after the last round:
// ROUNDS+1 cycles from start to done (25 by default).
// Following the document: a fixed round repeated over the state with all
// rounds alike except their constant. Own choices: one round per cycle, 24
// rounds (the round count of the 1600-bit Keccak permutation).
module mkd_permutation #(
  parameter int unsigned ROUNDS = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          start,
  input  logic [1599:0] state_in,
  output logic [1599:0] state_out,
  output logic          busy,
  output logic          done
);
  logic [1599:0] st_q, st_next;
  logic [4:0]    rnd_q;

  mkd_round u_round (.state_in(st_q), .round(rnd_q), .state_out(st_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= '0;
      rnd_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && (load || start)) begin
        st_q  <= state_in;
        rnd_q <= '0;
        busy  <= start;
      end else if (busy) begin
        st_q  <= st_next;
        rnd_q <= rnd_q + 1'b1;
        if (rnd_q == 5'(ROUNDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign state_out = st_q;

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !(load || start));
endmodule
