// Self-checking testbench of weight_update: random error and R0/S-LUT words;
// the increment must be floor(e * (r0 + s) / 2^MU_SHIFT) cut to PW bits.
module tb_weight_update;
  localparam int unsigned B = 8, N = 4, YW = 16, PW = 16, MU_SHIFT = 7;
  localparam int unsigned SW = B + $clog2(N);

  logic signed [YW-1:0] e;
  logic signed [SW-1:0] r0_word, s_word;
  logic signed [PW-1:0] delta;
  int checks = 0, failures = 0;

  weight_update #(.B(B), .N(N), .YW(YW), .PW(PW), .MU_SHIFT(MU_SHIFT)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t, p, q;
    logic signed [PW-1:0] want;
    for (int it = 0; it < 2000; it++) begin
      e       = YW'($urandom_range(8000)) - YW'(4000);
      r0_word = SW'(int'($urandom_range(255)) - 128);
      s_word  = SW'(int'($urandom_range(3 * 255)) - 3 * 128);
      if (it < 4) e = it[0] ? -YW'(1) : YW'(1);
      #1;
      t = longint'(r0_word) + longint'(s_word);
      p = longint'(e) * t;
      // floor division by 2^MU_SHIFT
      q = p / (64'sd1 <<< MU_SHIFT);
      if (q * (64'sd1 <<< MU_SHIFT) != p && p < 0) q = q - 1;
      want = PW'(q);
      checks++;
      if (delta !== want) begin
        failures++;
        $display("e %0d r0 %0d s %0d: got %0d want %0d", e, r0_word, s_word, delta, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
