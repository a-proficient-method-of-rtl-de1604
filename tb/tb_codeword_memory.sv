// Testbench for codeword_memory.
// Random writes, upsets and reads against a model array; checks that reads
// return the model word one cycle after rd_en, that upsets flip exactly the
// masked bits, that a write beats an upset to the same word, and that reset
// clears every word.
module tb_codeword_memory;
  localparam int DEPTH = 16, WIDTH = 15;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, upset_en = 0, rd_en = 0;
  logic [3:0] wr_addr = 0, upset_addr = 0, rd_addr = 0;
  logic [WIDTH-1:0] wr_word = 0, upset_mask = 0, rd_word;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expect_rd;
  bit   expect_valid;
  int checks = 0, failures = 0;

  codeword_memory #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    expect_valid = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // after reset every word reads as zero
    for (int i = 0; i < DEPTH; i++) begin
      rd_en <= 1; rd_addr <= 4'(i);
      @(posedge clk); #1;
      checks++;
      if (rd_word !== '0) begin failures++; $display("FAIL reset word %0d = %h", i, rd_word); end
    end
    for (int n = 0; n < 1500; n++) begin
      wr_en      <= ($urandom_range(0, 2) == 0);
      wr_addr    <= 4'($urandom);
      wr_word    <= WIDTH'($urandom);
      upset_en   <= ($urandom_range(0, 3) == 0);
      upset_addr <= (n % 7 == 0) ? wr_addr : 4'($urandom);
      upset_mask <= WIDTH'(1) << $urandom_range(0, WIDTH - 1) | ((n % 3 == 0) ? WIDTH'($urandom) : '0);
      rd_en      <= $urandom_range(0, 1);
      rd_addr    <= 4'($urandom);
      @(posedge clk);
      // model: read sees old contents, upset then write
      if (rd_en) begin expect_rd = model[rd_addr]; expect_valid = 1; end
      else expect_valid = 0;
      if (upset_en) model[upset_addr] ^= upset_mask;
      if (wr_en) model[wr_addr] = wr_word;
      #1;
      if (expect_valid) begin
        checks++;
        if (rd_word !== expect_rd) begin
          failures++;
          $display("FAIL read: got %h expected %h", rd_word, expect_rd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
