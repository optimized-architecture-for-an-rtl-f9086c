// Self-checking testbench of adf_ctrl: checks the control sequence of one
// iteration cycle by cycle (load, B filter cycles with s1 first and s0 last,
// one error cycle, 2^(N-1) adaptation cycles with addresses 0.. and the S-LUT
// update in the last), the iteration period of 1 + B + 1 + 2^(N-1) cycles with
// enable held high, and that nothing starts while enable is low.
module tb_adf_ctrl;
  import da_adf_pkg::*;
  localparam int unsigned N = 4, B = 8;
  localparam int unsigned DEPTH = 2 ** (N - 1);
  localparam int unsigned PERIOD = 1 + B + 1 + DEPTH;

  logic clk = 1'b0, rst, enable;
  logic ready, load, shift, acc_en, s0, s1, err_en, upd_en, slut_update;
  logic [N-2:0] upd_addr;
  adf_phase_e phase;
  int checks = 0, failures = 0;
  int cycle = 0, load_cycle [$];

  // cycle numbers at which a sample is taken (sampled mid-cycle)
  always @(negedge clk) begin
    cycle++;
    if (load) load_cycle.push_back(cycle);
  end

  adf_ctrl #(.N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctl(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%t %s: got %b want %b", $time, what, got, want);
    end
  endtask

  // samples the controls just before each rising edge
  task automatic one_iteration();
    // cycle 0: load
    expect_ctl("ready", ready, 1'b1);
    expect_ctl("load", load, 1'b1);
    @(posedge clk); #1;
    for (int j = 0; j < B; j++) begin
      expect_ctl("shift", shift, 1'b1);
      expect_ctl("acc_en", acc_en, 1'b1);
      expect_ctl("s1", s1, j == 0);
      expect_ctl("s0", s0, j == B - 1);
      expect_ctl("ready(filter)", ready, 1'b0);
      expect_ctl("load(filter)", load, 1'b0);
      @(posedge clk); #1;
    end
    expect_ctl("err_en", err_en, 1'b1);
    expect_ctl("shift(err)", shift, 1'b0);
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      expect_ctl("upd_en", upd_en, 1'b1);
      checks++;
      if (upd_addr != (N-1)'(a)) begin
        failures++;
        $display("upd_addr got %0d want %0d", upd_addr, a);
      end
      expect_ctl("slut_update", slut_update, a == DEPTH - 1);
      expect_ctl("err_en(adapt)", err_en, 1'b0);
      @(posedge clk); #1;
    end
  endtask

  initial begin
    rst = 1'b1; enable = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    // idle with enable low: nothing happens
    repeat (5) begin
      expect_ctl("ready(idle)", ready, 1'b1);
      expect_ctl("load(idle)", load, 1'b0);
      expect_ctl("shift(idle)", shift, 1'b0);
      expect_ctl("upd_en(idle)", upd_en, 1'b0);
      @(posedge clk); #1;
    end
    enable = 1'b1;
    #1;
    for (int it = 0; it < 3; it++) one_iteration();
    // iteration period with enable held high
    repeat (2 * PERIOD) @(posedge clk);
    checks++;
    if (load_cycle.size() < 4) begin
      failures++;
      $display("only %0d loads", load_cycle.size());
    end
    for (int i = 1; i < load_cycle.size(); i++) begin
      checks++;
      if (load_cycle[i] - load_cycle[i-1] != PERIOD) begin
        failures++;
        $display("period got %0d cycles want %0d", load_cycle[i] - load_cycle[i-1], PERIOD);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
