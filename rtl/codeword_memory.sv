// Code word memory.
//
// Stores encoded words as a plain array (DEPTH x WIDTH). One write port stores a
// code word, one read port returns a stored word one cycle after rd_en, and an
// upset port XORs a mask into a stored word, modelling single or multiple bit
// upsets of the cells. A write and an upset to the same address in the same
// cycle: the write wins. All words reset to zero, which is a valid code word.
// Depth, width and timing are this design's choices; the method only places a
// memory between the encoder and the decoder.
module codeword_memory #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 15,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_word,
  input  logic             upset_en,
  input  logic [AW-1:0]    upset_addr,
  input  logic [WIDTH-1:0] upset_mask,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_word
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rd_word <= '0;
    end else begin
      if (upset_en) mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
      if (wr_en) mem[wr_addr] <= wr_word;
      if (rd_en) rd_word <= mem[rd_addr];
    end
  end

endmodule
