// N-tap LMS adaptive FIR filter built on distributed arithmetic (DA) with
// offset binary coding (OBC), without a multiplier in the filter path.
//
// Filtering: the input samples sit in a bank of bit-serial shift registers.
// Each cycle one bit of every sample forms an OBC address into the primary LUT
// (P-LUT), which holds the 2^(N-1) signed combinations 1/2[w0 +- w1 +- ...] of
// the weights; a shift-accumulator sums the words over the B bit planes,
// starting from P_initial = -1/2 sum w_i. y(n) comes out after B cycles.
//
// Adaptation: e(n) = d(n) - y(n). Rather than updating N weights and
// rebuilding the P-LUT, every P-LUT word is moved by mu e(n) T_a(n), where T_a
// is the same combination of the input samples. T_a is R0 (x(n)/2) plus a
// secondary-LUT (S-LUT) word; the S-LUT is advanced to the next time step in
// place by averaging pairs and adding/subtracting R0, with a rotating address
// instead of moving data. P_initial follows the last P-LUT word.
//
// Interface: when `ready` and `enable` are high at a clock edge, x_in and d_in
// are taken. B + 1 cycles later y_out and e_out are updated and out_valid
// pulses for one cycle; after 2^(N-1) more cycles (adaptation) `ready` is high
// again. With enable held high one sample is processed every
// 1 + B + 1 + 2^(N-1) cycles (18 at the defaults). Synchronous active-high
// reset clears the history and all weights.
//
// Number formats (own choice, the source gives none beyond 8-bit x_in/d_in and
// 16-bit y_out/e_out): x_in, d_in two's complement integers; weights with FRAC
// fractional bits; y_out = floor(sum_i w_i x(n-i)); mu = 2^-(MU_SHIFT+FRAC).
module da_adaptive_fir
  import da_adf_pkg::*;
#(
  parameter int unsigned N        = 4,   // filter taps
  parameter int unsigned B        = 8,   // input sample width (x_in)
  parameter int unsigned DW       = 8,   // desired-response width (d_in)
  parameter int unsigned YW       = 16,  // output and error width
  parameter int unsigned PW       = 16,  // P-LUT word width
  parameter int unsigned FRAC     = 8,   // fractional bits of the weights
  parameter int unsigned MU_SHIFT = 7    // mu = 2^-(MU_SHIFT+FRAC)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic signed [B-1:0]  x_in,
  input  logic signed [DW-1:0] d_in,
  output logic                 ready,
  output logic signed [YW-1:0] y_out,
  output logic signed [YW-1:0] e_out,
  output logic                 out_valid
);

  localparam int unsigned AW = PW + B + 1;
  localparam int unsigned SW = B + $clog2(N);

  // control
  logic         load, shift, acc_en, s0, s1, err_en, upd_en, slut_update;
  logic [N-2:0] upd_addr;
  adf_phase_e   phase;

  // datapath
  logic [N-1:0]         addr_bits;
  logic [N-2:0]         obc_addr;
  logic                 negate;
  logic signed [PW-1:0] p_word, p_initial, delta;
  logic signed [AW-1:0] acc;
  logic signed [SW-1:0] s_word, r0_word;
  logic signed [DW-1:0] d_reg;
  logic signed [YW-1:0] y_now;

  adf_ctrl #(.N(N), .B(B)) u_ctrl (
    .clk, .rst, .enable, .ready, .load, .shift, .acc_en, .s0, .s1,
    .err_en, .upd_en, .upd_addr, .slut_update, .phase
  );

  input_reg_bank #(.N(N), .B(B)) u_bank (
    .clk, .rst, .load, .shift, .x_in(x_in), .addr_bits
  );

  obc_addr_gen #(.N(N)) u_obc (
    .addr_bits, .s0, .lut_addr(obc_addr), .negate
  );

  p_lut #(.N(N), .PW(PW)) u_plut (
    .clk, .rst, .rd_addr(obc_addr), .rd_data(p_word),
    .upd_en, .upd_addr, .upd_delta(delta), .p_initial
  );

  shift_acc #(.B(B), .PW(PW)) u_acc (
    .clk, .rst, .en(acc_en), .s1, .negate, .lut_word(p_word), .p_initial, .acc
  );

  s_lut #(.N(N), .B(B)) u_slut (
    .clk, .rst, .r0_load(load), .x_new(x_in), .rd_addr(upd_addr),
    .s_word, .r0_word, .slut_update, .rot()
  );

  weight_update #(.B(B), .N(N), .YW(YW), .PW(PW), .MU_SHIFT(MU_SHIFT)) u_wupd (
    .e(e_out), .r0_word, .s_word, .delta
  );

  // y(n) = acc / 2^(FRAC+1), e(n) = d(n) - y(n)
  assign y_now = YW'(acc >>> (FRAC + 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      d_reg     <= '0;
      y_out     <= '0;
      e_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= err_en;
      if (load) d_reg <= d_in;
      if (err_en) begin
        y_out <= y_now;
        e_out <= YW'(d_reg) - y_now;
      end
    end
  end

  // the bank must be in its rest orientation whenever a sample is loaded
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(load && phase != PH_IDLE))
        else $error("da_adaptive_fir: sample loaded outside the idle phase");
    end
  end

endmodule
