// Testbench: constant-input operation of da_adaptive_fir at its default
// parameters, x(n) = 10 and d(n) = 18 for every sample. Every y(n)/e(n) is
// compared with the reference model (adf_ref_pkg). The output must settle
// close to the desired value: adaptation stops once every increment
// floor(e * T_a / 2^MU_SHIFT) rounds to zero, which with |T_a| <= N*X happens
// for |e| < 2^MU_SHIFT / (N*X) = 3.2, so the final error must lie within that
// dead zone while it started at d = 18.
module tb_da_adaptive_fir_const;
  import adf_ref_pkg::*;
  localparam int N = 4, B = 8, YW = 16, PW = 16, FRAC = 8, MU_SHIFT = 7;
  localparam int SAMPLES = 200;
  localparam int X = 10, D = 18;

  logic clk = 1'b0, rst, enable;
  logic signed [7:0] x_in, d_in;
  logic ready, out_valid;
  logic signed [15:0] y_out, e_out;
  int checks = 0, failures = 0;

  da_adaptive_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (SAMPLES * 40 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  adf_ref #(N, B, YW, PW, FRAC, MU_SHIFT) model;

  initial begin
    longint y_ref, e_ref;
    model = new();
    rst = 1'b1; enable = 1'b0; x_in = 8'(X); d_in = 8'(D);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    enable = 1'b1;
    for (int n = 0; n < SAMPLES; n++) begin
      #1;
      wait (ready);
      @(posedge clk); #1;
      model.push(X);
      wait (out_valid);
      y_ref = model.y_out();
      e_ref = D - y_ref;
      checks += 2;
      if (longint'(y_out) != y_ref || longint'(e_out) != e_ref) begin
        failures++;
        if (failures < 10) $display("n %0d: y %0d e %0d, want %0d %0d", n, y_out, e_out, y_ref, e_ref);
      end
      model.adapt(e_ref);
      if (n >= SAMPLES - 20) begin
        checks++;
        if (longint'(e_out) * longint'(e_out) * N * N * X * X >= (64'sd1 <<< (2 * MU_SHIFT))) begin
          failures++;
          $display("n %0d: not settled, e = %0d", n, e_out);
        end
      end
      @(posedge clk);
    end
    $display("final y = %0d for d = %0d", y_out, D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
