// Weight-adaptation logic of the DA LMS adaptive filter (combinational).
//
// The LMS rule w_k(n+1) = w_k(n) + mu e(n) x(n-k) moves every P-LUT word, being
// a fixed +/- combination of the weights, by mu e(n) T_a(n), with
// T_a(n) = R0(n) + s_a(n) the same combination of the input samples. In the
// scaled integer form used throughout (P-LUT word Q_a = 2^(FRAC+1) P_a,
// S-LUT/R0 words doubled) that is
//   delta = (e * (r0_word + s_word)) >>> MU_SHIFT,
// i.e. a step size mu = 2^-(MU_SHIFT+FRAC). The arithmetic shift rounds toward
// minus infinity; the result is cut to PW bits.
//
// The increment of the words through R0 + S-LUT follows the document; one
// multiplier, the power-of-two step size and the rounding are this design's
// own choices.
module weight_update #(
  parameter int unsigned B        = 8,   // input sample width
  parameter int unsigned N        = 4,   // filter taps
  parameter int unsigned YW       = 16,  // error width
  parameter int unsigned PW       = 16,  // P-LUT word width
  parameter int unsigned MU_SHIFT = 7    // step size mu = 2^-(MU_SHIFT+FRAC)
) (
  input  logic signed [YW-1:0]          e,
  input  logic signed [B+$clog2(N)-1:0] r0_word,
  input  logic signed [B+$clog2(N)-1:0] s_word,
  output logic signed [PW-1:0]          delta
);

  localparam int unsigned SW = B + $clog2(N);

  logic signed [SW-1:0]    t2;     // 2 T_a: sum of N samples, fits SW bits
  logic signed [YW+SW-1:0] prod;

  always_comb begin
    t2    = r0_word + s_word;
    prod  = (YW+SW)'(e) * (YW+SW)'(t2);
    delta = PW'(prod >>> MU_SHIFT);
  end

endmodule
