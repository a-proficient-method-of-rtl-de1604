// Majority gate of the majority-logic decoder.
//
// maj is 1 when more than half of the J check sums are 1, i.e. when most of the
// parity equations that contain the bit under decoding fail; the bit is then
// taken to be wrong. With J = 4 this needs 3 of 4; a 2-2 tie leaves the bit
// alone. Combinational. The strict-majority threshold is this design's reading
// of the method's majority rule.
module majority_gate #(
  parameter int unsigned J = 4
) (
  input  logic [J-1:0] sums,
  output logic         maj
);

  localparam int unsigned CW = $clog2(J + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int j = 0; j < J; j++) ones += CW'(sums[j]);
    maj = (ones > CW'(J / 2));
  end

endmodule
