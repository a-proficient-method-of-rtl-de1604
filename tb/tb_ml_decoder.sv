// Testbench for ml_decoder.
// Code words (encoded here by long division by g(x)) are sent bit-serially with
// 0 to 4 bits flipped. Expected results: a word with up to two errors comes out
// as the original code word; an error-free word takes the early exit after 3
// decoding cycles, a word with 1 to 4 errors is detected and decoded for all 15
// cycles; the three-error pattern {0,1,4} is known to leave the check sums
// non-zero (decode_fail). Latency from the edge that takes the last bit to the
// edge that raises out_valid is checked for isolated words: 3 + 2 cycles
// error-free, 15 + 2 with errors. Words sent back to back must make the bit
// input stall while a word decodes.
module tb_ml_decoder;
  import eg_ldpc_pkg::*;
  localparam int D = 3;

  typedef struct {
    codeword_t orig;
    codeword_t mask;
    int        nerr;
    int        t_last;
    bit        timed;
  } item_t;

  logic clk = 0, rst_n = 0;
  logic bit_valid = 0, bit_in = 0, bit_ready;
  logic out_valid, out_error_detected, out_early, out_decode_fail;
  codeword_t out_word;
  logic [3:0] out_cycles;
  item_t q [$];
  int cyc = 0, checks = 0, failures = 0;
  int n_early = 0, n_full = 0, n_corrected = 0, n_fail = 0, n_stall = 0;

  ml_decoder #(.DETECT_CYCLES(D)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic codeword_t encode(input int unsigned m);
    int unsigned c = m << 8;
    for (int i = 14; i >= 8; i--) if (c[i]) c = c ^ (32'h1D1 << (i - 8));
    return codeword_t'((m << 8) | c);
  endfunction

  function automatic codeword_t random_mask(input int nerr);
    codeword_t m = '0;
    while ($countones(m) < nerr) m[$urandom_range(0, 14)] = 1'b1;
    return m;
  endfunction

  task automatic check(input bit ok, input string what, input item_t it);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: orig=%h mask=%h out=%h early=%b det=%b fail=%b cyc=%0d",
               what, it.orig, it.mask, out_word, out_early, out_error_detected,
               out_decode_fail, out_cycles);
    end
  endtask

  // monitor, sampled at the falling edge
  always @(negedge clk) if (rst_n && out_valid) begin
    item_t it;
    if (q.size() == 0) begin
      failures++; checks++;
      $display("FAIL output without input");
    end else begin
      it = q.pop_front();
      if (it.nerr <= 2) check(out_word === it.orig, "corrected word", it);
      if (it.nerr == 0) begin
        check(out_early === 1 && out_error_detected === 0 && out_cycles == 4'(D), "early exit", it);
        n_early++;
      end else begin
        check(out_early === 0 && out_error_detected === 1 && out_cycles == 4'(N), "full decode", it);
        n_full++;
        if (it.nerr <= 2) n_corrected++;
      end
      if (it.nerr <= 2) check(out_decode_fail === 0, "no decode_fail", it);
      if (it.mask == 15'h0013) check(out_decode_fail === 1, "decode_fail", it);
      if (out_decode_fail) n_fail++;
      if (it.timed)
        check(cyc - it.t_last == ((it.nerr == 0) ? D + 2 : N + 2), "latency", it);
    end
  end

  always @(negedge clk) if (bit_valid && !bit_ready) n_stall++;

  task automatic send(input codeword_t orig, input codeword_t mask, input bit timed);
    item_t it;
    codeword_t w = orig ^ mask;
    bit hs;
    it.orig = orig; it.mask = mask; it.nerr = $countones(mask); it.timed = timed;
    for (int i = 0; i < N; i++) begin
      bit_valid = 1; bit_in = w[i];
      do begin hs = bit_ready; @(negedge clk); end while (!hs);
    end
    bit_valid = 0;
    it.t_last = cyc;
    q.push_back(it);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // isolated words, latency checked
    for (int n = 0; n < 150; n++) begin
      int ne;
      ne = (n < 10) ? n % 5 : $urandom_range(0, 4);
      send(encode($urandom_range(0, 127)), random_mask(ne), 1);
      repeat (25) @(negedge clk);
    end
    send(encode(7'h3C), 15'h0013, 1);
    repeat (25) @(negedge clk);
    // back to back
    for (int n = 0; n < 150; n++)
      send(encode($urandom_range(0, 127)), random_mask($urandom_range(0, 2)), 0);
    repeat (40) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d words never came out", q.size()); end
    checks++;
    if (n_early == 0 || n_full == 0 || n_corrected == 0 || n_fail == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL mechanism never seen: early=%0d full=%0d corrected=%0d fail=%0d stall=%0d",
               n_early, n_full, n_corrected, n_fail, n_stall);
    end
    $display("early=%0d full=%0d corrected=%0d decode_fail=%0d stall_cycles=%0d",
             n_early, n_full, n_corrected, n_fail, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
