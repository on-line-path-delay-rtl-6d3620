// Shared constants and helper functions of the Omega MIN and its path delay
// fault test logic.
//
// An n x n Omega MIN (n = 2**N) has N stages of n/2 two-by-two switches with a
// perfect shuffle in front of every stage. A position p (N bits) on the link
// before stage i moves to rotl(p) at the input of that stage; a switch in the
// cross state flips bit 0 of the position. These helpers compute the shuffle,
// the parity used by the test vectors and the complementary test vector of
// any network size.
package omega_pkg;

  // Perfect shuffle of an N-bit position: rotate left by one.
  function automatic int unsigned shuffle(input int unsigned p, input int unsigned nbits);
    int unsigned msb;
    msb = (p >> (nbits - 1)) & 1;
    return ((p << 1) & ((1 << nbits) - 1)) | msb;
  endfunction

  // Inverse perfect shuffle: rotate right by one.
  function automatic int unsigned unshuffle(input int unsigned p, input int unsigned nbits);
    return (p >> 1) | ((p & 1) << (nbits - 1));
  endfunction

  // Parity of the set bits of a value.
  function automatic logic parity(input int unsigned p);
    logic r;
    r = 1'b0;
    for (int b = 0; b < 32; b++) r ^= p[b];
    return r;
  endfunction

  // Bit i of the test vector built by the recursive rule: 0110 for the 4x4
  // network, and v[i] = u[i], v[i+n/2] = ~u[i] when doubling the size. The
  // rule doubles a prefix with its complement, so bit i is the parity of i
  // (the Thue-Morse sequence).
  function automatic logic test_vector_bit(input int unsigned i);
    return parity(i);
  endfunction

endpackage
