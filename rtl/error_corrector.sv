// Error corrector: the XOR gate that corrects the bit under decoding.
//
// Compares the last bit of the cyclic shift register (the bit under decoding)
// with the majority-gate output: when the majority says the bit is wrong it is
// inverted, otherwise it passes unchanged. enable, this design's own addition,
// blocks correction outside decoding cycles. Combinational.
module error_corrector (
  input  logic last_bit,
  input  logic maj,
  input  logic enable,
  output logic corrected_bit
);

  assign corrected_bit = last_bit ^ (maj & enable);

endmodule
