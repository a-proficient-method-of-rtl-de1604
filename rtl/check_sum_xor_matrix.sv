// XOR matrix ("check parity"): the J parity check sums orthogonal on the bit
// under decoding.
//
// Each check sum B_j is the XOR of the code word bits selected by row j of
// CHECK_MASK; all rows contain bit N-1 and no other bit is shared between rows.
// The sums come straight from the code word bits (a Type-II majority-logic
// decoder), with no syndrome register. All sums are zero for a valid code word.
// Combinational. The check sums of the (15,7) EG-LDPC code are this design's
// choice of code.
module check_sum_xor_matrix
  import eg_ldpc_pkg::*;
(
  input  codeword_t      word,
  output logic [J-1:0]   sums
);

  always_comb begin
    for (int j = 0; j < J; j++) sums[j] = ^(word & CHECK_MASK[j]);
  end

endmodule
