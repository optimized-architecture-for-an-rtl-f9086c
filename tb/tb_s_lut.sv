// Self-checking testbench of s_lut. A random input stream is fed through R0
// and the in-place S-LUT update; after every new sample each logical word must
// equal sum_{k=1}^{N-1} (+/-) x(n-k), computed from a reference history, R0
// must equal x(n), and the address rotation must step 0, 1, .., N-2, 0, ..
module tb_s_lut;
  localparam int unsigned N = 4, B = 8;
  localparam int unsigned SW = B + $clog2(N);
  localparam int unsigned DEPTH = 2 ** (N - 1);

  logic clk = 1'b0, rst, r0_load, slut_update;
  logic signed [B-1:0] x_new;
  logic [N-2:0] rd_addr;
  logic signed [SW-1:0] s_word, r0_word;
  logic [$clog2(N-1)-1:0] rot;
  int checks = 0, failures = 0;
  int hist [N];
  int rot_seen [N-1];

  s_lut #(.N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    rst = 1'b1; r0_load = 1'b0; slut_update = 1'b0; x_new = '0; rd_addr = '0;
    for (int k = 0; k < N; k++) hist[k] = 0;
    for (int r = 0; r < N - 1; r++) rot_seen[r] = 0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    for (int it = 0; it < 60; it++) begin
      x_new = B'($urandom);
      if (it == 5) x_new = {1'b1, {(B-1){1'b0}}};   // most negative sample
      if (it == 6) x_new = {1'b0, {(B-1){1'b1}}};   // most positive sample
      r0_load = 1'b1;
      @(posedge clk); #1;
      r0_load = 1'b0;
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = int'(x_new);
      checks++;
      if (int'(r0_word) != hist[0]) begin
        failures++;
        $display("it %0d: R0 got %0d want %0d", it, r0_word, hist[0]);
      end
      checks++;
      if (int'(rot) != it % (N - 1)) begin
        failures++;
        $display("it %0d: rot got %0d want %0d", it, rot, it % (N - 1));
      end
      rot_seen[rot]++;
      for (int a = 0; a < DEPTH; a++) begin
        rd_addr = (N-1)'(a);
        #1;
        want = 0;
        for (int k = 1; k < N; k++) want += ((a >> (N - 1 - k)) & 1) ? hist[k] : -hist[k];
        checks++;
        if (int'(s_word) != want) begin
          failures++;
          $display("it %0d addr %0d: got %0d want %0d", it, a, s_word, want);
        end
      end
      repeat (1 + $urandom_range(2)) @(posedge clk);
      #1;
      slut_update = 1'b1;
      @(posedge clk); #1;
      slut_update = 1'b0;
    end
    for (int r = 0; r < N - 1; r++) begin
      checks++;
      if (rot_seen[r] == 0) begin
        failures++;
        $display("rotation %0d never used", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
