// Testbench for error_corrector.
// All eight input combinations: the bit is inverted exactly when the majority
// says it is wrong and correction is enabled.
module tb_error_corrector;
  logic last_bit, maj, enable, corrected_bit;
  int checks = 0, failures = 0;

  error_corrector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {enable, maj, last_bit} = 3'(v);
      #1 checks++;
      if (corrected_bit !== ((enable && maj) ? !last_bit : last_bit)) begin
        failures++;
        $display("FAIL en=%b maj=%b bit=%b out=%b", enable, maj, last_bit, corrected_bit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
