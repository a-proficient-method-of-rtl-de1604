// Output buffer of the majority-logic decoder/detector.
//
// The output is driven only when the control unit raises finish: then the shift
// register contents, with the status of the decode, are registered and
// out_valid is high for one cycle; at all other times out_valid is low and the
// outputs are zero. After an early finish the register has been rotated
// DETECT_CYCLES times, so the word is rotated back here and the output always
// has the stored bit order. Gating the output on finish follows the method,
// which uses tristate buffers; a registered, zeroed output in place of high
// impedance and the rotation back are this design's choices.
module output_buffer #(
  parameter int unsigned N             = 15,
  parameter int unsigned DETECT_CYCLES = 3,
  localparam int unsigned CW           = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          finish,
  input  logic          early,
  input  logic          error_detected,
  input  logic          decode_fail,
  input  logic [CW-1:0] cycles,
  input  logic [N-1:0]  word,
  output logic          out_valid,
  output logic [N-1:0]  out_word,
  output logic          out_early,
  output logic          out_error_detected,
  output logic          out_decode_fail,
  output logic [CW-1:0] out_cycles
);

  logic [N-1:0] realigned;

  // undo DETECT_CYCLES left rotations
  assign realigned = (word >> DETECT_CYCLES) | (word << (N - DETECT_CYCLES));

  always_ff @(posedge clk) begin
    if (!rst_n || !finish) begin
      out_valid          <= 1'b0;
      out_word           <= '0;
      out_early          <= 1'b0;
      out_error_detected <= 1'b0;
      out_decode_fail    <= 1'b0;
      out_cycles         <= '0;
    end else begin
      out_valid          <= 1'b1;
      out_word           <= early ? realigned : word;
      out_early          <= early;
      out_error_detected <= error_detected;
      out_decode_fail    <= decode_fail;
      out_cycles         <= cycles;
    end
  end

endmodule
