// Testbench for eg_ldpc_encoder.
// Exhaustive over all 128 data words. Each code word must carry the data in bits
// 14..8 and be a multiple of g(x) = 1 + x^4 + x^6 + x^7 + x^8, checked here by
// plain long division of the 15-bit code word; a few words are also compared
// with values worked out by hand from the same division.
module tb_eg_ldpc_encoder;
  import eg_ldpc_pkg::*;

  dataword_t data;
  codeword_t codeword;
  int checks = 0, failures = 0;

  eg_ldpc_encoder dut (.data, .codeword);

  function automatic int unsigned rem_g(input int unsigned c);
    for (int i = 14; i >= 8; i--)
      if (c[i]) c = c ^ (32'h1D1 << (i - 8));  // g(x) = 0x1D1
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: data=%h codeword=%h", what, data, codeword);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      data = 7'(v);
      #1;
      check(codeword[14:8] == data, "systematic data bits");
      check(rem_g(32'(codeword)) == 0, "multiple of g(x)");
    end
    data = 7'h01; #1; check(codeword == 15'h01D1, "m=01");
    data = 7'h2A; #1; check(codeword == 15'h2A1A, "m=2A");
    data = 7'h55; #1; check(codeword == 15'h55E5, "m=55");
    data = 7'h7F; #1; check(codeword == 15'h7FFF, "m=7F");
    data = 7'h40; #1; check(codeword == 15'h40E8, "m=40");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
