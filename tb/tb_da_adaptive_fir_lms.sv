// Testbench: the DA adaptive filter against the textbook per-weight LMS
// recursion (see adf_lms_check), bit for bit, at the default 4 taps / 8-bit
// input and, to exercise the parameterisation, at 3 taps / 6-bit input and
// 5 taps / 8-bit input. The three instances run one after another.
module tb_da_adaptive_fir_lms;
  logic clk = 1'b0;
  logic go = 1'b0;
  logic done4, done3, done5;
  int c4, f4, c3, f3, c5, f5;
  int checks, failures;

  always #5 clk = ~clk;

  adf_lms_check #(.N(4), .B(8)) u_n4 (.clk, .start(go),    .done(done4), .checks(c4), .failures(f4));
  adf_lms_check #(.N(3), .B(6)) u_n3 (.clk, .start(done4), .done(done3), .checks(c3), .failures(f3));
  adf_lms_check #(.N(5), .B(8)) u_n5 (.clk, .start(done3), .done(done5), .checks(c5), .failures(f5));

  initial begin
    repeat (3 * 400 * 40 + 3000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c3 + c5, f4 + f3 + f5 + 1);
    $finish;
  end

  initial begin
    // the helpers clear `done` at time 0; start and watch only after that
    #1 go = 1'b1;
    wait (done4 && done3 && done5);
    checks   = c4 + c3 + c5;
    failures = f4 + f3 + f5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
