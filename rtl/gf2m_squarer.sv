// GF(2^m) squarer, combinational (one-cycle latency once registered by the user).
// Squaring in a polynomial basis spreads the input bits apart: bit i of a
// moves to bit 2i of a 2m-1 bit product with zeros in between. The product is
// then reduced modulo the fixed field polynomial f(x) = x^M + POLY. Because
// f(x) is a constant, the reduction loop below folds into a fixed XOR
// network (no gates beyond XORs), as the document describes for its "wired
// XOR" squarer.
// Interface: a (M bits) in, y = a^2 mod f(x) out.
// Following the document: zero-interleaving and constant-polynomial
// reduction. Own choice: the polynomial is a parameter (default NIST B-163).
module gf2m_squarer #(
  parameter int unsigned  M    = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);
  logic [2*M-2:0] t;

  always_comb begin
    t = '0;
    for (int i = 0; i < M; i++) t[2*i] = a[i];
    // Fold every bit above M-1 back with x^M = POLY.
    for (int i = 2*M-2; i >= M; i--) begin
      if (t[i]) begin
        t[i] = 1'b0;
        t[i-M +: M] = t[i-M +: M] ^ POLY;
      end
    end
    y = t[M-1:0];
  end
endmodule
