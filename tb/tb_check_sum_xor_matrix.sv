// Testbench for check_sum_xor_matrix.
// Every one of the 128 code words (encoded here by long division) must give all
// check sums zero. Random words are compared with the four check equations
// written out bit by bit, and each sum must be 1 for an error in bit 14 alone
// and for an error in each of its own bits.
module tb_check_sum_xor_matrix;
  import eg_ldpc_pkg::*;

  codeword_t word;
  logic [3:0] sums, ref_sums;
  int checks = 0, failures = 0;

  check_sum_xor_matrix dut (.word, .sums);

  function automatic codeword_t encode(input int unsigned m);
    int unsigned c = m << 8;
    for (int i = 14; i >= 8; i--) if (c[i]) c = c ^ (32'h1D1 << (i - 8));
    return codeword_t'((m << 8) | c);
  endfunction

  function automatic logic [3:0] equations(input codeword_t w);
    return {w[7] ^ w[8] ^ w[10] ^ w[14], w[3] ^ w[11] ^ w[12] ^ w[14],
            w[1] ^ w[5] ^ w[13] ^ w[14], w[0] ^ w[2] ^ w[6] ^ w[14]};
  endfunction

  task automatic check(input logic [3:0] want, input string what);
    #1 checks++;
    if (sums !== want) begin
      failures++;
      $display("FAIL %s: word=%h sums=%b expected %b", what, word, sums, want);
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
    for (int m = 0; m < 128; m++) begin word = encode(m); check(4'b0000, "code word"); end
    for (int n = 0; n < 2000; n++) begin word = 15'($urandom); check(equations(word), "random word"); end
    word = 15'h4000; check(4'b1111, "error in bit 14");
    word = 15'h0001; check(4'b0001, "error in bit 0");
    word = 15'h2000; check(4'b0010, "error in bit 13");
    word = 15'h1000; check(4'b0100, "error in bit 12");
    word = 15'h0400; check(4'b1000, "error in bit 10");
    word = 15'h0010; check(4'b0000, "bit 4 is in no check sum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
