// Self-checking testbench of shift_acc: B cycles of random LUT words and
// add/subtract controls, P_initial entered in the first cycle; the result
// must be sum_j (+/-)word_j * 2^j + P_initial, exactly.
module tb_shift_acc;
  localparam int unsigned B = 8;
  localparam int unsigned PW = 16;

  logic clk = 1'b0, rst, en, s1, negate;
  logic signed [PW-1:0] lut_word, p_initial;
  logic signed [PW+B:0] acc;
  int checks = 0, failures = 0;

  shift_acc #(.B(B), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint want;
    rst = 1'b1; en = 1'b0; s1 = 1'b0; negate = 1'b0; lut_word = '0; p_initial = '0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    for (int it = 0; it < 300; it++) begin
      p_initial = PW'($urandom);
      if (it < 4) p_initial = (it[0]) ? {1'b1, {(PW-1){1'b0}}} : {1'b0, {(PW-1){1'b1}}};
      want = longint'(p_initial);
      for (int j = 0; j < B; j++) begin
        lut_word = PW'($urandom);
        if (it < 4) lut_word = (it[1]) ? {1'b1, {(PW-1){1'b0}}} : {1'b0, {(PW-1){1'b1}}};
        negate   = 1'($urandom);
        s1       = (j == 0);
        en       = 1'b1;
        want    += (negate ? -longint'(lut_word) : longint'(lut_word)) <<< j;
        @(posedge clk); #1;
        // a disabled cycle in between must hold the accumulator
        if (j == 2) begin
          en = 1'b0;
          lut_word = PW'($urandom);
          @(posedge clk); #1;
        end
      end
      en = 1'b0; s1 = 1'b0;
      checks++;
      if (longint'(acc) != want) begin
        failures++;
        $display("it %0d: got %0d want %0d", it, acc, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
