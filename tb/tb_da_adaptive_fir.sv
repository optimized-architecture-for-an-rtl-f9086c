// End-to-end testbench of da_adaptive_fir at its default parameters: system
// identification. An unknown 4-tap FIR h drives d(n) = sum h_i x(n-i) from a
// random input; the filter must adapt towards h.
//
// Checks:
//  * every output y(n) and error e(n) against the reference model (LUT-level
//    LMS arithmetic, adf_ref_pkg), sample by sample;
//  * latency: out_valid comes B+2 cycles after the cycle that takes the sample,
//    and with enable held high samples are taken every 1+B+1+2^(N-1) cycles;
//  * convergence: the mean |e| over the last samples is far below the first;
//  * every mechanism happened at least once: P_initial entering the
//    accumulator, mirror (negated) LUT entries, sign-bit-plane subtraction,
//    each S-LUT address rotation, reads from both the EVEN and the ODD bank,
//    stalls (enable low while ready), positive and negative errors.
module tb_da_adaptive_fir;
  import adf_ref_pkg::*;
  localparam int N = 4, B = 8, DW = 8, YW = 16, PW = 16, FRAC = 8, MU_SHIFT = 7;
  localparam int PERIOD = 1 + B + 1 + 2 ** (N - 1);
  localparam int SAMPLES = 600;

  logic clk = 1'b0, rst, enable;
  logic signed [B-1:0]  x_in;
  logic signed [DW-1:0] d_in;
  logic ready, out_valid;
  logic signed [YW-1:0] y_out, e_out;
  int checks = 0, failures = 0;

  da_adaptive_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (SAMPLES * PERIOD * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- counters
  int cycle = 0;
  int n_pinit = 0, n_mirror = 0, n_signplane = 0, n_stall = 0;
  int n_rot [N-1];
  int n_even = 0, n_odd = 0, n_epos = 0, n_eneg = 0;
  int load_cycles [$], valid_cycles [$];

  always @(negedge clk) begin
    cycle++;
    if (!rst) begin
      if (dut.load) load_cycles.push_back(cycle);
      if (out_valid) valid_cycles.push_back(cycle);
      if (dut.s1 && dut.p_initial != 0) n_pinit++;
      if (dut.acc_en && !dut.addr_bits[0]) n_mirror++;
      if (dut.s0) n_signplane++;
      if (dut.ready && !enable) n_stall++;
      if (dut.upd_en) begin
        n_rot[dut.u_slut.rot]++;
        if (dut.u_slut.phys[0]) n_odd++; else n_even++;
      end
      if (out_valid && e_out > 0) n_epos++;
      if (out_valid && e_out < 0) n_eneg++;
    end
  end

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, count);
  endtask

  // ------------------------------------------------------------------ stimulus
  adf_ref #(N, B, YW, PW, FRAC, MU_SHIFT) model;
  int h [N] = '{96, -48, 32, 64};        // unknown system, in 1/128 units
  int xh [N];

  initial begin
    longint y_ref, e_ref, sum_first, sum_last;
    int dv;
    model = new();
    for (int r = 0; r < N - 1; r++) n_rot[r] = 0;
    for (int i = 0; i < N; i++) xh[i] = 0;
    sum_first = 0; sum_last = 0;
    rst = 1'b1; enable = 1'b0; x_in = '0; d_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    for (int n = 0; n < SAMPLES; n++) begin
      // new sample pair
      for (int i = N - 1; i > 0; i--) xh[i] = xh[i-1];
      xh[0] = int'($urandom_range(120)) - 60;
      if (n == 3) xh[0] = -128;        // extreme codes reach the sign-bit plane
      if (n == 4) xh[0] = 127;
      dv = 0;
      for (int i = 0; i < N; i++) dv += h[i] * xh[i];
      dv = dv / 128;
      if (dv > 127) dv = 127;
      if (dv < -128) dv = -128;
      x_in = B'(xh[0]);
      d_in = DW'(dv);
      // stall now and then: hold enable low for a few cycles
      if (n % 7 == 3) begin
        wait (ready);
        enable = 1'b0;
        repeat (1 + $urandom_range(3)) @(posedge clk);
        #1;
      end
      enable = 1'b1;
      #1;
      wait (ready);
      @(posedge clk); #1;                // sample taken at this edge
      // keep enable high for back-to-back operation, but change the data
      if (n == SAMPLES - 1) enable = 1'b0;
      x_in = B'($urandom);
      d_in = DW'($urandom);
      model.push(longint'(xh[0]));
      wait (out_valid);
      y_ref = model.y_out();
      e_ref = adf_ref #(N, B, YW, PW, FRAC, MU_SHIFT)::wrap(longint'(dv) - y_ref, YW);
      checks++;
      if (longint'(y_out) != y_ref) begin
        failures++;
        if (failures < 10) $display("n %0d: y got %0d want %0d", n, y_out, y_ref);
      end
      checks++;
      if (longint'(e_out) != e_ref) begin
        failures++;
        if (failures < 10) $display("n %0d: e got %0d want %0d", n, e_out, e_ref);
      end
      model.adapt(e_ref);
      if (n < 50) sum_first += (e_ref < 0) ? -e_ref : e_ref;
      if (n >= SAMPLES - 50) sum_last += (e_ref < 0) ? -e_ref : e_ref;
      @(posedge clk); #1;
    end
    // let the last adaptation finish
    repeat (PERIOD) @(posedge clk);

    $display("mean |e|: first 50 samples %0d/50, last 50 samples %0d/50", sum_first, sum_last);
    checks++;
    if (!(sum_last * 4 < sum_first && sum_last <= 3 * 50)) begin
      failures++;
      $display("filter did not converge");
    end

    // latency and rate
    checks++;
    if (load_cycles.size() != SAMPLES || valid_cycles.size() != SAMPLES) begin
      failures++;
      $display("%0d loads, %0d outputs, want %0d", load_cycles.size(), valid_cycles.size(), SAMPLES);
    end else begin
      int back_to_back = 0;
      for (int i = 0; i < SAMPLES; i++) begin
        checks++;
        if (valid_cycles[i] - load_cycles[i] != B + 2) begin
          failures++;
          $display("latency got %0d want %0d", valid_cycles[i] - load_cycles[i], B + 2);
        end
        if (i > 0) begin
          checks++;
          if (load_cycles[i] - load_cycles[i-1] < PERIOD) begin
            failures++;
            $display("samples %0d cycles apart, minimum %0d", load_cycles[i] - load_cycles[i-1], PERIOD);
          end
          if (load_cycles[i] - load_cycles[i-1] == PERIOD) back_to_back++;
        end
      end
      need("back-to-back iterations", back_to_back);
    end

    need("P_initial into accumulator", n_pinit);
    need("mirror LUT entries", n_mirror);
    need("sign-bit plane cycles", n_signplane);
    need("stall cycles", n_stall);
    for (int r = 0; r < N - 1; r++) need($sformatf("S-LUT rotation %0d", r), n_rot[r]);
    need("EVEN bank reads", n_even);
    need("ODD bank reads", n_odd);
    need("positive errors", n_epos);
    need("negative errors", n_eneg);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
