// Word serializer: parallel-in, serial-out shift register on the memory read side.
//
// load copies a word read from memory; the word then leaves one bit per cycle,
// least significant bit first, on bit_valid/bit_out, holding a bit while
// bit_ready is low. busy is high from load until the last bit is taken; load
// must not be raised while busy (checked by an assertion).
// This read-side streaming is this design's glue: the decoder expects the word
// it checks to arrive bit by bit.
module word_serializer #(
  parameter int unsigned N = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] load_word,
  output logic         busy,
  output logic         bit_valid,
  output logic         bit_out,
  input  logic         bit_ready
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  sreg;
  logic [CW-1:0] left;  // bits still to send

  assign busy      = (left != '0);
  assign bit_valid = busy;
  assign bit_out   = sreg[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sreg <= '0;
      left <= '0;
    end else if (load) begin
      sreg <= load_word;
      left <= CW'(N);
    end else if (bit_valid && bit_ready) begin
      sreg <= sreg >> 1;
      left <= left - CW'(1);
    end
  end

  // a new word may only be loaded once the previous one has left
  a_load_when_idle: assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy)
    else $error("word_serializer loaded while busy");

endmodule
