// Testbench for cyclic_shift_register.
// Loads random words, rotates with random corrected bits and holds, comparing
// every cycle with a model: on rotate, bit 0 takes the corrected bit and bit i
// takes old bit i-1; load beats rotate. With the corrected bit equal to the old
// top bit, 15 rotations must give back the loaded word.
module tb_cyclic_shift_register;
  localparam int N = 15;

  logic clk = 0, rst_n = 0;
  logic load = 0, rotate = 0, corrected_bit = 0;
  logic [N-1:0] load_word = 0, word, model;
  int checks = 0, failures = 0;

  cyclic_shift_register #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      load          <= ($urandom_range(0, 9) == 0);
      rotate        <= $urandom_range(0, 1);
      load_word     <= N'($urandom);
      corrected_bit <= $urandom_range(0, 1);
      @(posedge clk);
      if (load) model = load_word;
      else if (rotate) begin
        for (int i = N - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = corrected_bit;
      end
      #1 checks++;
      if (word !== model) begin failures++; $display("FAIL word %h model %h", word, model); end
    end
    // full turn returns the word
    load <= 1; load_word <= 15'h3C5A; rotate <= 0;
    @(posedge clk); #1;
    load <= 0; rotate <= 1;
    for (int i = 0; i < N; i++) begin
      corrected_bit <= word[N-1];
      @(posedge clk); #1;
    end
    rotate <= 0;
    checks++;
    if (word !== 15'h3C5A) begin failures++; $display("FAIL full turn %h", word); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
