// Testbench for output_buffer.
// With finish low the outputs must stay zero with out_valid low. On finish the
// word and status appear in the next cycle for one cycle; after an early finish
// the word must come out rotated right by three places (undoing three left
// rotations, computed here bit by bit), otherwise unchanged.
module tb_output_buffer;
  localparam int N = 15, D = 3;

  logic clk = 0, rst_n = 0;
  logic finish = 0, early = 0, error_detected = 0, decode_fail = 0;
  logic [3:0] cycles = 0, out_cycles;
  logic [N-1:0] word = 0, out_word, exp_word;
  logic out_valid, out_early, out_error_detected, out_decode_fail;
  int checks = 0, failures = 0;

  output_buffer #(.N(N), .DETECT_CYCLES(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      finish = $urandom_range(0, 1);
      early = $urandom_range(0, 1);
      error_detected = $urandom_range(0, 1);
      decode_fail = $urandom_range(0, 1);
      cycles = 4'($urandom);
      word = N'($urandom);
      for (int i = 0; i < N; i++) exp_word[i] = early ? word[(i + D) % N] : word[i];
      @(negedge clk);
      checks++;
      if (finish) begin
        if (out_valid !== 1 || out_word !== exp_word || out_early !== early ||
            out_error_detected !== error_detected || out_decode_fail !== decode_fail ||
            out_cycles !== cycles) begin
          failures++;
          $display("FAIL driven: word=%h early=%b out=%h expected %h", word, early, out_word, exp_word);
        end
      end else if (out_valid !== 0 || out_word !== 0 || out_early !== 0 ||
                   out_error_detected !== 0 || out_decode_fail !== 0 || out_cycles !== 0) begin
        failures++;
        $display("FAIL output driven without finish");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
