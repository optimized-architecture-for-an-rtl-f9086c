// Testbench helper: one da_adaptive_fir instance checked against the textbook
// LMS recursion
//   y(n) = sum_i w_i x(n-i),  e(n) = d(n) - y(n),  w_i += mu e(n) x(n-i),
// computed weight by weight, without any LUT. The instance runs with
// MU_SHIFT = 0, i.e. mu = 2^-FRAC, where every P-LUT increment is exact, so the
// filter must match the recursion bit for bit: y_out = floor(sum_i W_i x(n-i)
// / 2^FRAC) with integer weights W_i = 2^FRAC w_i. Small random inputs keep the
// recursion stable at this step size; d(n) comes from an integer N-tap system
// (taps 1, -2, 1, 2, 1, -2, ...), onto which the weights must converge.
// Drives its own instance once `start` is high; raises `done` with the counts.
module adf_lms_check #(
  parameter int N = 4,
  parameter int B = 8,
  parameter int SAMPLES = 400
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int DW = 8, YW = 16, FRAC = 8;

  logic rst, enable;
  logic signed [B-1:0]  x_in;
  logic signed [DW-1:0] d_in;
  logic ready, out_valid;
  logic signed [YW-1:0] y_out, e_out;

  da_adaptive_fir #(.N(N), .B(B), .DW(DW), .YW(YW), .FRAC(FRAC), .MU_SHIFT(0)) dut (
    .clk, .rst, .enable, .x_in, .d_in, .ready, .y_out, .e_out, .out_valid
  );

  longint h [N];
  longint w [N];
  longint xh [N];

  function automatic longint floor_div(longint v, longint d);
    longint r;
    r = v / d;
    if (r * d != v && v < 0) r -= 1;
    return r;
  endfunction

  initial begin
    longint acc, y_ref, e_ref, dv;
    done = 1'b0; checks = 0; failures = 0;
    for (int i = 0; i < N; i++) begin
      w[i] = 0; xh[i] = 0;
      h[i] = (i % 4 == 0) ? 1 : (i % 4 == 1) ? -2 : (i % 4 == 2) ? 1 : 2;
    end
    rst = 1'b1; enable = 1'b0; x_in = '0; d_in = '0;
    wait (start);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < SAMPLES; n++) begin
      for (int i = N - 1; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = longint'($urandom_range(4)) - 2;
      dv = 0;
      for (int i = 0; i < N; i++) dv += h[i] * xh[i];
      x_in = B'(xh[0]);
      d_in = DW'(dv);
      enable = 1'b1;
      #1;
      wait (ready);
      @(posedge clk); #1;
      enable = 1'b0;
      wait (out_valid);
      acc = 0;
      for (int i = 0; i < N; i++) acc += w[i] * xh[i];
      y_ref = floor_div(acc, 64'sd1 <<< FRAC);
      e_ref = dv - y_ref;
      checks++;
      if (longint'(y_out) != y_ref) begin
        failures++;
        if (failures < 10) $display("N=%0d n %0d: y got %0d want %0d", N, n, y_out, y_ref);
      end
      checks++;
      if (longint'(e_out) != e_ref) begin
        failures++;
        if (failures < 10) $display("N=%0d n %0d: e got %0d want %0d", N, n, e_out, e_ref);
      end
      // LMS: w += mu e x with mu = 2^-FRAC, on W = 2^FRAC w
      for (int i = 0; i < N; i++) w[i] += e_ref * xh[i];
      @(posedge clk); #1;
    end
    // converged onto the unknown system (within a quarter of a unit)
    for (int i = 0; i < N; i++) begin
      checks++;
      if (w[i] - h[i] * (64'sd1 <<< FRAC) > 64 || h[i] * (64'sd1 <<< FRAC) - w[i] > 64) begin
        failures++;
        $display("N=%0d weight %0d = %0d/256, system %0d", N, i, w[i], h[i]);
      end
    end
    $display("N=%0d B=%0d: %0d checks, %0d failures", N, B, checks, failures);
    done = 1'b1;
  end
endmodule
