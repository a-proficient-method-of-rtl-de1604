// Cyclic shift register of the majority-logic decoder.
//
// Holds the code word under decoding. load copies a new word in. In each
// decoding cycle (rotate) the bit under decoding, bit N-1, is replaced by its
// corrected value and the whole word rotates by one: the corrected bit moves to
// position 0 and bit N-2 becomes the next bit under decoding. After N rotations
// every bit has been decoded once and the word is back in its original order.
// load has priority over rotate. The rotating register follows the method; the
// rotation direction is this design's choice.
module cyclic_shift_register #(
  parameter int unsigned N = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] load_word,
  input  logic         rotate,
  input  logic         corrected_bit,
  output logic [N-1:0] word
);

  always_ff @(posedge clk) begin
    if (!rst_n)      word <= '0;
    else if (load)   word <= load_word;
    else if (rotate) word <= {word[N-2:0], corrected_bit};
  end

endmodule
