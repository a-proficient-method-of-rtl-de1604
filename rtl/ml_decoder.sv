// Majority-logic decoder with early error-free termination (the proposed
// error detection and correction path for one memory word).
//
// Data path: bit_arranger collects the word bit-serially (LSB first) and hands
// it to the cyclic shift register. Each decoding cycle the XOR matrix forms the
// four check sums orthogonal on bit 14, the majority gate decides whether bit 14
// is wrong, the error corrector flips it if so, and the register rotates by one.
// The control unit watches the check sums of the first DETECT_CYCLES cycles: if
// they were all zero the word is error-free and is released after only
// DETECT_CYCLES rotations; otherwise all 15 bits are decoded. The output buffer
// drives the result for one cycle when the control unit finishes.
// Latency, from the cycle a full word is taken to out_valid: DETECT_CYCLES + 2
// cycles for an error-free word, N + 2 for a word with errors. While a word is
// decoded the next one is collected; it is taken in the finish cycle at the
// earliest, and the bit input stalls (bit_ready low) while a full word waits.
// The structure follows the method; the handshakes and exact timing are this
// design's own.
module ml_decoder
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned DETECT_CYCLES = 3,
  localparam int unsigned CW           = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bit_valid,
  input  logic          bit_in,
  output logic          bit_ready,
  output logic          out_valid,
  output codeword_t     out_word,
  output logic          out_error_detected,
  output logic          out_early,
  output logic          out_decode_fail,
  output logic [CW-1:0] out_cycles
);

  codeword_t     arr_word, sreg;
  logic          arr_valid, take;
  logic [J-1:0]  sums;
  logic          maj, corrected_bit;
  logic          busy, rotate, finish, early, error_detected, decode_fail;
  logic [CW-1:0] cycles;

  assign take = arr_valid && (!busy || finish);

  bit_arranger #(.N(N)) u_arrange (
    .clk, .rst_n, .bit_valid, .bit_in, .bit_ready,
    .word_valid(arr_valid), .word(arr_word), .word_ready(take)
  );

  cyclic_shift_register #(.N(N)) u_sreg (
    .clk, .rst_n, .load(take), .load_word(arr_word), .rotate,
    .corrected_bit, .word(sreg)
  );

  check_sum_xor_matrix u_xor (.word(sreg), .sums);

  majority_gate #(.J(J)) u_maj (.sums, .maj);

  error_corrector u_corr (
    .last_bit(sreg[N-1]), .maj, .enable(rotate), .corrected_bit
  );

  mld_control_unit #(.N(N), .DETECT_CYCLES(DETECT_CYCLES)) u_ctrl (
    .clk, .rst_n, .start(take), .sums, .busy, .rotate, .finish, .early,
    .error_detected, .decode_fail, .cycles
  );

  output_buffer #(.N(N), .DETECT_CYCLES(DETECT_CYCLES)) u_out (
    .clk, .rst_n, .finish, .early, .error_detected, .decode_fail, .cycles,
    .word(sreg), .out_valid, .out_word, .out_early, .out_error_detected,
    .out_decode_fail, .out_cycles
  );

endmodule
