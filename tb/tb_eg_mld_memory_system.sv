// End-to-end testbench for eg_mld_memory_system at its default size
// (16 words, three detection cycles).
// Writes random data to every word, injects soft errors through the upset port
// (0 to 4 flipped bits, sometimes as two separate upsets of the same word), and
// reads the words back. Expected results come from the written data alone:
// with up to two flipped bits the data must come back unchanged; an untouched
// word must take the early exit (3 decoding cycles) and a word with 1 to 4
// flipped bits must be flagged and decoded for 15 cycles; the pattern {0,1,4}
// must be reported as decode_fail. An isolated read must give out_valid 22
// cycles after rd_en for a clean word and 34 for a word with errors. Reads
// issued back to back must see rd_ready low. Each of these mechanisms is counted
// and must happen at least once. The decoder's own input stall cannot occur
// here (a word takes longer to stream in than to decode); it is only reported.
module tb_eg_mld_memory_system;
  import eg_ldpc_pkg::*;

  typedef struct {
    dataword_t data;
    codeword_t mask;
    int        t_rd;
    bit        timed;
  } item_t;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, upset_en = 0, rd_en = 0;
  logic [3:0] wr_addr = 0, upset_addr = 0, rd_addr = 0;
  dataword_t wr_data = 0;
  codeword_t upset_mask = 0;
  logic rd_ready, out_valid, out_error_detected, out_early, out_decode_fail;
  dataword_t out_data;
  codeword_t out_codeword;
  logic [3:0] out_cycles;

  dataword_t data_of [16];
  codeword_t mask_of [16];
  item_t q [$];
  int cyc = 0, checks = 0, failures = 0;
  int n_early = 0, n_corrected = 0, n_detected_only = 0, n_fail = 0;
  int n_stall = 0, n_busy = 0, n_upsets = 0;

  eg_mld_memory_system dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what, input item_t it);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: data=%h mask=%h out=%h early=%b det=%b fail=%b cycles=%0d",
               what, it.data, it.mask, out_data, out_early, out_error_detected,
               out_decode_fail, out_cycles);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (dut.bit_valid && !dut.bit_ready) n_stall++;
    if (rd_en && !rd_ready) n_busy++;
    if (out_valid) begin
      item_t it;
      int ne;
      if (q.size() == 0) begin
        checks++; failures++;
        $display("FAIL output without read");
      end else begin
        it = q.pop_front();
        ne = $countones(it.mask);
        if (ne <= 2) check(out_data === it.data, "data", it);
        if (ne == 0) begin
          check(out_early === 1 && out_error_detected === 0 && out_cycles == 4'd3, "early exit", it);
          n_early++;
        end else begin
          check(out_early === 0 && out_error_detected === 1 && out_cycles == 4'd15, "full decode", it);
          if (ne <= 2) n_corrected++; else n_detected_only++;
        end
        if (ne <= 2) check(out_decode_fail === 0, "no decode_fail", it);
        if (it.mask == 15'h0013) check(out_decode_fail === 1, "decode_fail", it);
        if (out_decode_fail) n_fail++;
        if (it.timed) check(cyc - it.t_rd == ((ne == 0) ? 22 : 34), "read latency", it);
      end
    end
  end

  task automatic write(input int a, input dataword_t d);
    wr_en = 1; wr_addr = 4'(a); wr_data = d;
    @(negedge clk);
    wr_en = 0;
    data_of[a] = d; mask_of[a] = '0;
  endtask

  task automatic upset(input int a, input codeword_t m);
    upset_en = 1; upset_addr = 4'(a); upset_mask = m;
    @(negedge clk);
    upset_en = 0;
    mask_of[a] ^= m;
    n_upsets++;
  endtask

  function automatic codeword_t random_mask(input int nerr);
    codeword_t m = '0;
    while ($countones(m) < nerr) m[$urandom_range(0, 14)] = 1'b1;
    return m;
  endfunction

  // read one word; waits for rd_ready; timed reads are checked for latency
  task automatic read(input int a, input bit timed);
    item_t it;
    bit acc;
    rd_en = 1; rd_addr = 4'(a);
    do begin acc = rd_ready; it.t_rd = cyc; @(negedge clk); end while (!acc);
    rd_en = 0;
    it.data = data_of[a]; it.mask = mask_of[a]; it.timed = timed;
    q.push_back(it);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int round = 0; round < 12; round++) begin
      for (int a = 0; a < 16; a++) write(a, 7'($urandom));
      for (int a = 0; a < 16; a++) begin
        int ne;
        codeword_t m, m1;
        ne = (round == 0) ? a % 5 : $urandom_range(0, 4);
        if (ne == 2 && a % 2 == 0) begin
          m = random_mask(2);
          m1 = m & (m - 1);  // two separate single-bit upsets
          upset(a, m1);
          upset(a, m ^ m1);
        end else if (ne > 0) upset(a, random_mask(ne));
      end
      if (round == 1) upset(5, 15'h0013 ^ mask_of[5]);
      if (round % 2 == 0) begin
        // isolated reads, latency checked
        for (int a = 0; a < 16; a++) begin
          read(a, 1);
          repeat (40) @(negedge clk);
        end
      end else begin
        // back-to-back reads
        for (int a = 0; a < 16; a++) read(a, 0);
        repeat (60) @(negedge clk);
      end
    end
    repeat (60) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d reads never returned", q.size()); end
    $display("early=%0d corrected=%0d detected_only=%0d decode_fail=%0d stall_cycles=%0d rd_busy_cycles=%0d upsets=%0d",
             n_early, n_corrected, n_detected_only, n_fail, n_stall, n_busy, n_upsets);
    checks++;
    if (n_early == 0 || n_corrected == 0 || n_detected_only == 0 || n_fail == 0 ||
        n_busy == 0 || n_upsets == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
