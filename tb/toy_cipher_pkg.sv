// toy_cipher_pkg: a toy authenticated cipher for simulation only. It is NOT
// secure; it stands in for the algorithm-specific CipherCore so that the
// interface logic around it can be tested end to end. Blocks are 128 bits
// with the first byte in the MSBs; a partial block is zero padded.
//   Nsec block n:   N = rotl(N ^ n, 7), N = 0 after each key load
//   start:          S = key ^ npub ^ N
//   AD block a:     S = rotl(S ^ a, 13)
//   message block:  ks = rotl(S, 5) ^ key, c = p ^ ks (cut to the block's
//                   length), S = rotl(S ^ p, 29)
//   tag:            T = S ^ key
package toy_cipher_pkg;

  function automatic logic [127:0] rotl(input logic [127:0] x, input int n);
    return (x << n) | (x >> (128 - n));
  endfunction

  // keep the first n bytes of a block (n = 16 for a full block)
  function automatic logic [127:0] keep(input logic [127:0] b, input int n);
    logic [127:0] r;
    for (int i = 0; i < 16; i++)
      r[127-8*i -: 8] = (i < n) ? b[127-8*i -: 8] : 8'h00;
    return r;
  endfunction

  function automatic logic [127:0] absorb_nsec(input logic [127:0] n, input logic [127:0] b);
    return rotl(n ^ b, 7);
  endfunction

  function automatic logic [127:0] absorb_ad(input logic [127:0] s, input logic [127:0] a);
    return rotl(s ^ a, 13);
  endfunction

  function automatic logic [127:0] keystream(input logic [127:0] s, input logic [127:0] k);
    return rotl(s, 5) ^ k;
  endfunction

  function automatic logic [127:0] absorb_msg(input logic [127:0] s, input logic [127:0] p);
    return rotl(s ^ p, 29);
  endfunction

endpackage
