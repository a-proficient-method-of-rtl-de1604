// Testbench for mld_control_unit.
// Starts decodes and feeds a chosen check-sum value in every decoding cycle k
// (k = 0 is the first cycle after start). Expected, worked out from the
// detection rule: with all sums zero in cycles 0..2 the unit rotates in cycles
// 0..2 and finishes early in cycle 3; with any non-zero sum in cycles 0..2 it
// rotates in cycles 0..14 and finishes in cycle 15, reporting decode_fail when
// the sums are still non-zero then. Also checks that a start in the finish cycle
// begins the next word at once.
module tb_mld_control_unit;
  localparam int N = 15, D = 3;

  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] sums = 0;
  logic busy, rotate, finish, early, error_detected, decode_fail;
  logic [3:0] cycles;
  int checks = 0, failures = 0;

  mld_control_unit #(.N(N), .DETECT_CYCLES(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what, input int k);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s in cycle %0d", what, k); end
  endtask

  // err_cycle: cycle 0..2 with a non-zero sum, or -1; late_sum: non-zero sum in
  // cycle 3; fail_end: sums non-zero in cycle N; chain: start again at finish
  task automatic run(input int err_cycle, input bit late_sum, input bit fail_end, input bit chain);
    bit exp_early = (err_cycle < 0);
    int fin = exp_early ? D : N;
    start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 0; k <= fin; k++) begin
      if (k == err_cycle)           sums = 4'($urandom_range(1, 15));
      else if (k == D && late_sum)  sums = 4'b0101;
      else if (k == N && fail_end)  sums = 4'b0010;
      else if (k > D && k < N && !exp_early) sums = 4'($urandom);
      else                          sums = 4'b0000;
      #1;
      check(busy === 1'b1, "busy", k);
      check(rotate === (k < fin), "rotate", k);
      check(finish === (k == fin), "finish", k);
      if (k == fin) begin
        check(early === exp_early, "early", k);
        check(error_detected === !exp_early, "error_detected", k);
        check(decode_fail === (!exp_early && fail_end), "decode_fail", k);
        check(cycles === 4'(fin), "cycle count", k);
        if (chain) start = 1;
      end
      @(negedge clk);
    end
    sums = 0;
    if (!chain) begin
      check(busy === 1'b0, "idle after finish", fin + 1);
      check(finish === 1'b0, "no finish when idle", fin + 1);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(-1, 0, 0, 0);
    run(0, 0, 0, 0);
    run(1, 0, 1, 0);
    run(2, 0, 0, 0);
    run(-1, 1, 0, 0);
    for (int n = 0; n < 200; n++)
      run($urandom_range(0, 3) == 0 ? -1 : $urandom_range(0, 2), $urandom_range(0, 1),
          $urandom_range(0, 1), (n % 2 == 0) && (n != 199));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
