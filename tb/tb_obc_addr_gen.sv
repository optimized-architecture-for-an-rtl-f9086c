// Self-checking testbench of obc_addr_gen. For every combination of address
// lines and s0 and several random weight sets, the signed partial sum formed
// from the generated address and sign (+/- LUT word, LUT built as printed:
// bit 1 = '+', newest weight always '+') must equal the OBC digit sum
// sum_i w_i d_i with d_i = +1 for bit 1, -1 for bit 0, negated in the
// sign-bit plane.
module tb_obc_addr_gen;
  localparam int unsigned N = 4;
  localparam int unsigned DEPTH = 2 ** (N - 1);

  logic [N-1:0] addr_bits;
  logic         s0;
  logic [N-2:0] lut_addr;
  logic         negate;
  int checks = 0, failures = 0;
  int w [N];
  int lut [DEPTH];

  obc_addr_gen #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, got;
    for (int set = 0; set < 8; set++) begin
      for (int i = 0; i < N; i++) w[i] = int'($urandom_range(2000)) - 1000;
      for (int a = 0; a < DEPTH; a++) begin
        lut[a] = w[0];
        for (int k = 1; k < N; k++) lut[a] += ((a >> (N - 1 - k)) & 1) ? w[k] : -w[k];
      end
      for (int v = 0; v < 2 ** N; v++) begin
        for (int sb = 0; sb < 2; sb++) begin
          addr_bits = N'(v);
          s0 = sb[0];
          #1;
          want = 0;
          for (int i = 0; i < N; i++) want += addr_bits[i] ? w[i] : -w[i];
          if (s0) want = -want;
          got = negate ? -lut[lut_addr] : lut[lut_addr];
          checks++;
          if (got != want) begin
            failures++;
            $display("bits %b s0 %0d: got %0d want %0d", addr_bits, s0, got, want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
