// keccak_round: one round of the Keccak-f[1600] permutation (theta, rho,
// pi, chi, iota) as combinational logic on 25 64-bit lanes, lane index
// x + 5*y. The round constant is selected by the round number rnd (0..23).
// This is the standard FIPS 202 permutation; the document uses it through
// its SHAKE256 unit and does not describe its insides.
module keccak_round (
  input  logic [63:0] a_in  [25],
  input  logic [4:0]  rnd,
  output logic [63:0] a_out [25]
);

  localparam logic [63:0] RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008};

  localparam int RHO [25] = '{0, 1, 62, 28, 27, 36, 44, 6, 55, 20, 3, 10, 43, 25, 39,
                              41, 45, 15, 21, 8, 18, 2, 61, 56, 14};

  function automatic logic [63:0] rotl(logic [63:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  logic [63:0] c [5];
  logic [63:0] d [5];
  logic [63:0] t [25];
  logic [63:0] b [25];

  always_comb begin
    for (int x = 0; x < 5; x++)
      c[x] = a_in[x] ^ a_in[x+5] ^ a_in[x+10] ^ a_in[x+15] ^ a_in[x+20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++)
      t[i] = a_in[i] ^ d[i%5];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(t[x + 5*y], RHO[x + 5*y]);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a_out[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    a_out[0] = a_out[0] ^ RC[rnd];
  end

endmodule
