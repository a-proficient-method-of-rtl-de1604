// Control unit of the majority-logic decoder/detector.
//
// A decode starts with start (the same cycle the word is loaded into the cyclic
// shift register). In each of the first DETECT_CYCLES decoding cycles the check
// sums are ORed together (OR1) and shifted into a DETECT_CYCLES-stage detection
// register while the word rotates. In the cycle after that, OR2 evaluates the
// detection register:
//   - zero: the word is error-free; finish and early pulse for one cycle and the
//     decode ends after DETECT_CYCLES rotations;
//   - one: decoding simply continues (that cycle is also a decoding cycle) until
//     all N bits have been processed; in the cycle after the N-th rotation the
//     check sums of the corrected word are evaluated once more, finish pulses and
//     decode_fail reports any check sum still non-zero.
// rotate tells the shift register to correct and rotate this cycle. cycles holds
// the number of rotations done, read in the finish cycle. start in the finish
// cycle begins the next word at once.
// The counter, OR1, the detection register, OR2 and the finish flag follow the
// method; evaluating OR2 in a cycle of its own and the decode_fail check are this
// design's reading of it.
module mld_control_unit
  import eg_ldpc_pkg::J;
#(
  parameter int unsigned N             = eg_ldpc_pkg::N,
  parameter int unsigned DETECT_CYCLES = 3,
  localparam int unsigned CW           = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [J-1:0]  sums,
  output logic          busy,
  output logic          rotate,
  output logic          finish,
  output logic          early,
  output logic          error_detected,
  output logic          decode_fail,
  output logic [CW-1:0] cycles
);

  logic [CW-1:0]            cnt;
  logic [DETECT_CYCLES-1:0] det_reg;
  logic                     or1, or2;

  assign or1    = |sums;
  assign or2    = |det_reg;
  assign cycles = cnt;

  always_comb begin
    rotate         = 1'b0;
    finish         = 1'b0;
    early          = 1'b0;
    decode_fail    = 1'b0;
    error_detected = or2;
    if (busy) begin
      if (cnt < CW'(DETECT_CYCLES)) begin
        rotate = 1'b1;
      end else if (cnt == CW'(DETECT_CYCLES) && !or2) begin
        finish = 1'b1;
        early  = 1'b1;
      end else if (cnt == CW'(N)) begin
        finish      = 1'b1;
        decode_fail = or1;
      end else begin
        rotate = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      det_reg <= '0;
    end else if (start) begin
      busy    <= 1'b1;
      cnt     <= '0;
      det_reg <= '0;
    end else if (busy) begin
      if (finish) busy <= 1'b0;
      if (rotate) cnt <= cnt + CW'(1);
      if (cnt < CW'(DETECT_CYCLES))
        det_reg <= DETECT_CYCLES'({det_reg, or1});
    end
  end

  initial begin
    assert (DETECT_CYCLES >= 1 && DETECT_CYCLES < N)
      else $error("DETECT_CYCLES must lie between 1 and N-1");
  end

endmodule
