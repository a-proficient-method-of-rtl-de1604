// Bit arranger: serial-in, parallel-out shift register.
//
// The word to be checked arrives one bit per cycle, least significant bit first
// (bit_valid/bit_in). Each accepted bit enters at the top and the word shifts
// down, so after N bits bit 0 of the word is in position 0. The full word is
// then offered on word/word_valid until the decoder takes it with word_ready;
// while a full word waits, bit_ready is low and the sender must hold its bit.
// A taken word frees the register in the same cycle, so a new word can follow
// back to back. Collecting the word serially follows the method; the bit order
// and the handshake are this design's choices.
module bit_arranger #(
  parameter int unsigned N = 15
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_valid,
  input  logic         bit_in,
  output logic         bit_ready,
  output logic         word_valid,
  output logic [N-1:0] word,
  input  logic         word_ready
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  sreg;
  logic [CW-1:0] count;  // bits held

  assign word_valid = (count == CW'(N));
  assign word       = sreg;
  assign bit_ready  = !word_valid || word_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sreg  <= '0;
      count <= '0;
    end else begin
      if (bit_valid && bit_ready) begin
        sreg  <= {bit_in, sreg[N-1:1]};
        count <= (word_valid && word_ready) ? CW'(1) : count + CW'(1);
      end else if (word_valid && word_ready) begin
        count <= '0;
      end
    end
  end

endmodule
