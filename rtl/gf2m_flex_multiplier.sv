// Flexible bit-serial GF(2^m) multiplier, polynomial basis.
// One multiplier serves every field size up to MMAX without reconfiguring the
// hardware: the field size m and the low part of the irreducible polynomial
// p(x) = x^m + poly are inputs, latched at start into the polynomial register
// P next to the multiplicand register A. Each cycle consumes one multiplier
// bit, most significant first: the AND array gates A with that bit and the
// accumulator is updated as C <- C*x mod p(x) + b_i*A. The modular shift uses
// bit m-1 of C (selected at run time) to decide whether P is folded back.
// Interface: start pulse with a, b, m, poly valid; busy while running; done
// pulses for one cycle with the product on c (held until the next start).
// Timing: done rises m+1 cycles after start (m shift/accumulate cycles plus
// the load cycle); a new start is accepted when busy is low.
// Following the document: polynomial register P, multiplicand register A,
// AND array selecting multiplier bits, run-time field size. Own choices:
// MSB-first order, one bit per cycle, and a multiplexer in place of the
// tristate buffers that select the multiplier bit.
module gf2m_flex_multiplier #(
  parameter int unsigned MMAX = 571,
  localparam int unsigned MW  = $clog2(MMAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [MW-1:0]   m,      // field size, 2..MMAX
  input  logic [MMAX-1:0] poly,   // p(x) - x^m, bits above m-1 must be 0
  input  logic [MMAX-1:0] a,
  input  logic [MMAX-1:0] b,
  output logic [MMAX-1:0] c,
  output logic            busy,
  output logic            done
);
  logic [MMAX-1:0] a_q, b_q, p_q, c_q, mask_q;
  logic [MW-1:0]   m_q, cnt_q;
  logic [MMAX-1:0] c_next;

  always_comb begin
    logic [MMAX-1:0] sh;
    sh = (c_q << 1) & mask_q;
    if (c_q[m_q - 1'b1]) sh = sh ^ p_q;
    c_next = sh ^ (b_q[cnt_q - 1'b1] ? a_q : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; p_q <= '0; c_q <= '0; mask_q <= '0;
      m_q <= MW'(2); cnt_q <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_q   <= a;
        b_q   <= b;
        p_q   <= poly;
        m_q   <= m;
        cnt_q <= m;
        c_q   <= '0;
        for (int i = 0; i < int'(MMAX); i++) mask_q[i] <= (i < int'(m));
        busy  <= 1'b1;
      end else if (busy) begin
        c_q   <= c_next;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == MW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign c = c_q;

  property p_start_needs_field;
    @(posedge clk) disable iff (!rst_n) (start && !busy) |-> (m >= MW'(2) && m <= MW'(MMAX));
  endproperty
  a_start_needs_field: assert property (p_start_needs_field);
endmodule
