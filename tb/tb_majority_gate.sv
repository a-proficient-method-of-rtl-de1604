// Testbench for majority_gate.
// All 16 inputs of the four-input gate: the output must be 1 exactly when three
// or four check sums are 1.
module tb_majority_gate;
  logic [3:0] sums;
  logic maj;
  int checks = 0, failures = 0;

  majority_gate #(.J(4)) dut (.sums, .maj);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      sums = 4'(v);
      ones = v[0] + v[1] + v[2] + v[3];
      #1 checks++;
      if (maj !== (ones >= 3)) begin failures++; $display("FAIL sums=%b maj=%b", sums, maj); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
