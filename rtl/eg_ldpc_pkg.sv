// Constants of the (15,7) Euclidean-geometry LDPC code shared by the encoder,
// the check-sum matrix and the decoder.
//
// The code is the cyclic code of the two-dimensional Euclidean geometry EG(2,2^2):
// length N = 15, K = 7 information bits, generator g(x) = 1 + x^4 + x^6 + x^7 + x^8.
// Bit i of a code word is the coefficient of x^i. Information bits sit in
// positions 14..8 and parity bits in 7..0 (systematic form). J = 4 parity check
// sums are orthogonal on bit 14: each contains bit 14 and no other bit appears in
// two of them, so one-step majority-logic decoding corrects up to 2 errors.
// The code choice is this design's own; the method only calls for an EG-LDPC
// code that is one-step majority-logic decodable.
package eg_ldpc_pkg;

  localparam int unsigned N = 15;  // code length
  localparam int unsigned K = 7;   // information bits
  localparam int unsigned R = N - K;  // parity bits
  localparam int unsigned J = 4;   // orthogonal check sums

  // g(x) coefficients, bit i = coefficient of x^i (degree R)
  localparam logic [R:0] GEN_POLY = 9'b1_1101_0001;

  // Check sums orthogonal on bit N-1; each mask selects the bits XORed together.
  //   B1 = c0 ^ c2  ^ c6  ^ c14
  //   B2 = c1 ^ c5  ^ c13 ^ c14
  //   B3 = c3 ^ c11 ^ c12 ^ c14
  //   B4 = c7 ^ c8  ^ c10 ^ c14
  localparam logic [J-1:0][N-1:0] CHECK_MASK = '{
    15'b100_0101_1000_0000,  // B4 (index 3)
    15'b101_1000_0000_1000,  // B3 (index 2)
    15'b110_0000_0010_0010,  // B2 (index 1)
    15'b100_0000_0100_0101   // B1 (index 0)
  };

  typedef logic [N-1:0] codeword_t;
  typedef logic [K-1:0] dataword_t;

  // Parity bits of the systematic code word: x^R * m(x) mod g(x).
  function automatic logic [R-1:0] parity_of(input dataword_t m);
    logic [R-1:0] rem;
    logic         fb;
    rem = '0;
    for (int i = K - 1; i >= 0; i--) begin
      fb  = m[i] ^ rem[R-1];
      rem = {rem[R-2:0], 1'b0};
      if (fb) rem = rem ^ GEN_POLY[R-1:0];
    end
    return rem;
  endfunction

  // Rotate by one position as the decoder does in each cycle:
  // bit N-1 moves to bit 0 and bit N-2 becomes the next bit under decoding.
  function automatic codeword_t rotl1(input codeword_t w);
    return {w[N-2:0], w[N-1]};
  endfunction

endpackage
