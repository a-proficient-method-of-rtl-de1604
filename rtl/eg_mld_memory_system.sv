// Memory protected by a (15,7) EG-LDPC code with a majority-logic decoder that
// finishes early on error-free words.
//
// Write side: wr_data (7 bits) is encoded into a 15-bit code word and stored at
// wr_addr. The upset port XORs upset_mask into the stored word at upset_addr,
// modelling soft errors (single or multiple bit upsets) in the cells.
// Read side: rd_en (accepted when rd_ready is high) reads the word at rd_addr;
// one cycle later it is loaded into a serializer that streams it, LSB first,
// into the decoder. The decoder checks the first three decoding cycles and
// releases an error-free word after them, or decodes all 15 bits to correct up
// to two errors. The result appears for one cycle on out_valid: corrected data,
// corrected code word, whether errors were detected, whether the early exit was
// taken, whether check sums were still non-zero after decoding, and the number
// of decoding cycles used.
// Timing of one read with nothing else in flight: rd_en in cycle t, bits enter
// the decoder in cycles t+2 .. t+16, the word is taken in t+17 and out_valid
// rises in t+22 (error-free) or t+34 (with errors). rd_ready is high again once
// the last bit has left the serializer, so reads overlap with decoding.
// Encoder, memory and decoder follow the method's memory system; the code, the
// memory size, the serial read-out and the upset port are this design's choices.
module eg_mld_memory_system
  import eg_ldpc_pkg::*;
#(
  parameter int unsigned DEPTH         = 16,
  parameter int unsigned DETECT_CYCLES = 3,
  localparam int unsigned AW           = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW           = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  dataword_t     wr_data,
  // soft-error injection
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  codeword_t     upset_mask,
  // read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_ready,
  // decoded result
  output logic          out_valid,
  output dataword_t     out_data,
  output codeword_t     out_codeword,
  output logic          out_error_detected,
  output logic          out_early,
  output logic          out_decode_fail,
  output logic [CW-1:0] out_cycles
);

  codeword_t enc_word, rd_word;
  logic      rd_pending, ser_busy;
  logic      bit_valid, bit_val, bit_ready;

  assign rd_ready = !rd_pending && !ser_busy;

  eg_ldpc_encoder u_enc (.data(wr_data), .codeword(enc_word));

  codeword_memory #(.DEPTH(DEPTH), .WIDTH(N)) u_mem (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_word(enc_word),
    .upset_en, .upset_addr, .upset_mask,
    .rd_en(rd_en && rd_ready), .rd_addr, .rd_word
  );

  always_ff @(posedge clk) begin
    if (!rst_n) rd_pending <= 1'b0;
    else        rd_pending <= rd_en && rd_ready;
  end

  word_serializer #(.N(N)) u_ser (
    .clk, .rst_n, .load(rd_pending), .load_word(rd_word), .busy(ser_busy),
    .bit_valid, .bit_out(bit_val), .bit_ready
  );

  ml_decoder #(.DETECT_CYCLES(DETECT_CYCLES)) u_dec (
    .clk, .rst_n, .bit_valid, .bit_in(bit_val), .bit_ready,
    .out_valid, .out_word(out_codeword), .out_error_detected, .out_early,
    .out_decode_fail, .out_cycles
  );

  assign out_data = out_codeword[N-1:R];

endmodule
