// Shift-and-accumulate unit of the OBC distributed-arithmetic filter.
//
// Bit planes arrive LSB first, one per enabled cycle, j = 0 .. B-1. Each cycle
//   acc <= feedback +/- (lut_word << (B-1)),
//   feedback = p_initial << (B-1)   when s1 (first cycle, j = 0),
//            = acc >>> 1            otherwise (the 2^-1 feedback path).
// The LUT word enters at bit B-1 so that the right shifts of the following
// B-1 cycles never drop a set bit: after the last cycle
//   acc = sum_j (+/-) lut_word_j * 2^j + p_initial,
// exactly, which for P-LUT words scaled by 2^(FRAC+1) equals 2^(FRAC+1) * y(n).
// `negate` selects subtraction (mirror-image entry or sign-bit plane).
//
// acc is a register that changes only on enabled cycles; synchronous reset
// clears it. The structure (add/subtract select, adder, accumulator, 2^-1
// feedback, P_initial mux on S1) follows the document; the accumulator width
// PW+B+1 and the aligned addition that keeps it exact are this design's own.
module shift_acc #(
  parameter int unsigned B  = 8,   // bit planes per output (input width)
  parameter int unsigned PW = 16   // LUT word width
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     s1,
  input  logic                     negate,
  input  logic signed [PW-1:0]     lut_word,
  input  logic signed [PW-1:0]     p_initial,
  output logic signed [PW+B:0]     acc
);

  localparam int unsigned AW = PW + B + 1;

  logic signed [AW-1:0] feedback, term, acc_next;

  always_comb begin
    term     = AW'(lut_word) <<< (B - 1);
    feedback = s1 ? (AW'(p_initial) <<< (B - 1)) : (acc >>> 1);
    acc_next = negate ? (feedback - term) : (feedback + term);
  end

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= acc_next;
  end

endmodule
