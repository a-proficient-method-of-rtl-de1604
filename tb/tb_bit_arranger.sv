// Testbench for bit_arranger.
// Sends random 15-bit words LSB first with random gaps between bits and takes
// the collected words with a randomly stalling word_ready. Every word must
// arrive whole and in order; the input must stall while a full word waits; a
// word sent without gaps must be offered in the cycle after its last bit.
module tb_bit_arranger;
  localparam int N = 15;

  logic clk = 0, rst_n = 0;
  logic bit_valid = 0, bit_in = 0, bit_ready, word_valid, word_ready = 0;
  logic [N-1:0] word;
  logic [N-1:0] sent [$];
  int checks = 0, failures = 0, stalls = 0, received = 0;

  bit_arranger #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink
  always @(posedge clk) begin
    if (rst_n) begin
      if (word_valid && word_ready) begin
        checks++;
        received++;
        if (sent.size() == 0 || word !== sent[0]) begin
          failures++;
          $display("FAIL word %h expected %h", word, sent.size() ? sent[0] : 'x);
        end
        if (sent.size()) void'(sent.pop_front());
      end
      if (bit_valid && !bit_ready) stalls++;
    end
    word_ready <= ($urandom_range(0, 3) != 0);
  end

  // inputs change at the falling edge; bit_ready sampled then holds until the
  // next rising edge, so it tells whether the bit is taken there
  task automatic send_word(input logic [N-1:0] w, input bit gaps);
    bit hs;
    sent.push_back(w);
    for (int i = 0; i < N; i++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin
        bit_valid = 0; @(negedge clk);
      end
      bit_valid = 1; bit_in = w[i];
      do begin
        hs = bit_ready;
        @(negedge clk);
      end while (!hs);
    end
    bit_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) send_word(N'($urandom), n % 2);
    repeat (20) @(negedge clk);
    // timing: ready sink, no gaps -> word_valid in the cycle after the last bit
    force word_ready = 1'b0;
    sent.push_back(15'h4A5B);
    for (int i = 0; i < N; i++) begin
      bit_valid = 1; bit_in = 1'(15'h4A5B >> i);
      @(posedge clk);
      #1;
      checks++;
      if (word_valid !== (i == N - 1)) begin failures++; $display("FAIL word_valid timing at bit %0d", i); end
    end
    bit_valid = 0;
    checks++;
    if (bit_ready !== 1'b0) begin failures++; $display("FAIL bit_ready high while full word waits"); end
    release word_ready;
    repeat (20) @(posedge clk);
    checks++;
    if (sent.size() != 0 || received != 201) begin failures++; $display("FAIL %0d words left", sent.size()); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL input never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
