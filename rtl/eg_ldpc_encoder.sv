// Systematic encoder for the (15,7) EG-LDPC code.
//
// Data words are encoded before they are stored in memory. The 7 information
// bits go unchanged into code word bits 14..8; the 8 parity bits 7..0 are the
// remainder of x^8 * m(x) divided by g(x) = 1 + x^4 + x^6 + x^7 + x^8, computed
// here as an unrolled division (a tree of XOR gates). Purely combinational.
// The method names the encoder only; its structure is this design's choice.
module eg_ldpc_encoder
  import eg_ldpc_pkg::*;
(
  input  dataword_t data,      // information bits
  output codeword_t codeword   // {data, parity}
);

  always_comb begin
    codeword = {data, parity_of(data)};
  end

endmodule
