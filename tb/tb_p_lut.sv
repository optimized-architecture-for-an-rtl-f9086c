// Self-checking testbench of p_lut: random read-modify-write updates against a
// reference array; checks every word through the read port and that
// P_initial always equals minus the last word.
module tb_p_lut;
  localparam int unsigned N = 4;
  localparam int unsigned PW = 16;
  localparam int unsigned DEPTH = 2 ** (N - 1);

  logic clk = 1'b0, rst, upd_en;
  logic [N-2:0] rd_addr, upd_addr;
  logic signed [PW-1:0] rd_data, upd_delta, p_initial;
  int checks = 0, failures = 0;
  logic signed [PW-1:0] ref_q [DEPTH];

  p_lut #(.N(N), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < DEPTH; a++) begin
      rd_addr = (N-1)'(a);
      #1;
      checks++;
      if (rd_data !== ref_q[a]) begin
        failures++;
        $display("word %0d: got %0d want %0d", a, rd_data, ref_q[a]);
      end
    end
    checks++;
    if (p_initial !== -ref_q[DEPTH-1]) begin
      failures++;
      $display("p_initial: got %0d want %0d", p_initial, -ref_q[DEPTH-1]);
    end
  endtask

  initial begin
    rst = 1'b1; upd_en = 1'b0; upd_addr = '0; upd_delta = '0; rd_addr = '0;
    for (int a = 0; a < DEPTH; a++) ref_q[a] = '0;
    @(posedge clk); @(posedge clk);
    #1 rst = 1'b0;
    check_all();
    for (int it = 0; it < 400; it++) begin
      upd_en    = ($urandom_range(3) != 0);
      upd_addr  = (N-1)'($urandom);
      upd_delta = PW'($urandom_range(4000)) - PW'(2000);
      @(posedge clk); #1;
      if (upd_en) ref_q[upd_addr] = ref_q[upd_addr] + upd_delta;
      upd_en = 1'b0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
