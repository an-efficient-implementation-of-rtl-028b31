// One round of the MKD hash permutation on a 1600-bit state (5 x 5 lanes of
// 64 bits; lane (x,y) holds state bits 64*(x+5y) .. 64*(x+5y)+63).
// The five steps of a round, all combinational:
//   1. column parity   K[x] = A[x,0]^A[x,1]^A[x,2]^A[x,3]^A[x,4]
//   2. mixing term     D[x] = K[x-1] ^ rot(K[x+1], 1);  A[x,y] ^= D[x]
//   3. rotate/permute  B[y, 2x+3y] = rot(A[x,y], r[x,y])
//   4. nonlinear step  A[x,y] = B[x,y] ^ (~B[x+1,y] & B[x+2,y])
//   5. round constant  A[0,0] ^= RC[round]
// The rotation amounts r[x,y] and the 24 round constants are fixed: both are
// computed at elaboration by the functions below (triangular-number offsets
// along the (x,y) -> (y, 2x+3y) walk, and an 8-bit LFSR with feedback
// polynomial x^8+x^6+x^5+x^4+1 for the constants), so no table is stored.
// Interface: state_in, round index (0..23) -> state_out.
// Following the document: the five steps and the 1600-bit state. The exact
// rotation amounts and constants are those of Keccak-f[1600], whose round
// the document's steps match; that identification is this design's own.
module mkd_round (
  input  logic [1599:0] state_in,
  input  logic [4:0]    round,
  output logic [1599:0] state_out
);
  function automatic logic [24*64-1:0] gen_rc();
    logic [24*64-1:0] tab;
    logic [7:0] r;
    logic       bit_t;
    tab = '0;
    r   = 8'h01;                          // LFSR state, bit 0 is the output
    for (int t = 0; t < 7 * 24; t++) begin
      bit_t = r[0];
      // place rc(t) at bit 2^j - 1 of round t/7 (j = t mod 7)
      tab[64 * (t / 7) + (1 << (t % 7)) - 1] = bit_t;
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h71 : 8'h00);
    end
    return tab;
  endfunction

  function automatic logic [25*6-1:0] gen_rot();
    logic [25*6-1:0] tab;
    int x, y, nx;
    tab = '0;
    x = 1; y = 0;
    for (int t = 0; t < 24; t++) begin
      tab[6 * (x + 5 * y) +: 6] = 6'(((t + 1) * (t + 2) / 2) % 64);
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return tab;
  endfunction

  localparam logic [24*64-1:0] RC  = gen_rc();
  localparam logic [25*6-1:0]  ROT = gen_rot();

  function automatic logic [63:0] rotl(logic [63:0] v, int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  logic [63:0] a [25];
  logic [63:0] b [25];
  logic [63:0] k [5];
  logic [63:0] d [5];

  always_comb begin
    for (int i = 0; i < 25; i++) a[i] = state_in[64*i +: 64];
    for (int x = 0; x < 5; x++) k[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = k[(x+4)%5] ^ rotl(k[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], int'(ROT[6*(x + 5*y) +: 6]));
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    a[0] = a[0] ^ RC[64*round +: 64];
    for (int i = 0; i < 25; i++) state_out[64*i +: 64] = a[i];
  end
endmodule
