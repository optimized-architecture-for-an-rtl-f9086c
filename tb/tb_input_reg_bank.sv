// Self-checking testbench of input_reg_bank: loads random samples and walks
// the bit planes, comparing every address line with the matching bit of a
// reference history of the last N samples (LSB first, newest on line 0).
module tb_input_reg_bank;
  localparam int unsigned N = 4;
  localparam int unsigned B = 8;

  logic clk = 1'b0, rst, load, shift;
  logic [B-1:0] x_in;
  logic [N-1:0] addr_bits;
  int checks = 0, failures = 0;
  logic [B-1:0] hist [N];

  input_reg_bank #(.N(N), .B(B)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; shift = 1'b0; x_in = '0;
    for (int k = 0; k < N; k++) hist[k] = '0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    for (int it = 0; it < 40; it++) begin
      // load a new sample
      x_in = B'($urandom);
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x_in;
      // B bit-serial cycles; an idle cycle in between must not disturb them
      for (int j = 0; j < B; j++) begin
        for (int k = 0; k < N; k++) begin
          checks++;
          if (addr_bits[k] !== hist[k][j]) begin
            failures++;
            $display("it %0d j %0d line %0d: got %b want %b", it, j, k, addr_bits[k], hist[k][j]);
          end
        end
        if (j == 3) begin @(posedge clk); #1; end
        shift = 1'b1;
        @(posedge clk); #1;
        shift = 1'b0;
      end
      // back in rest orientation: every line shows bit 0 again
      for (int k = 0; k < N; k++) begin
        checks++;
        if (addr_bits[k] !== hist[k][0]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
