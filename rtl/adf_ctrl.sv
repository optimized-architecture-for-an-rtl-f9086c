// Sequencer of the DA LMS adaptive filter: one filter iteration per sample.
//
//   PH_IDLE    ready = 1. When `enable` is high: load (new sample into the
//              register bank and R0, d(n) latched) and go to PH_FILTER.
//   PH_FILTER  B cycles, bit plane j = 0 .. B-1: shift + acc_en;
//              s1 = 1 for j = 0 (P_initial into the accumulator feedback),
//              s0 = 1 for j = B-1 (sign-bit plane is subtracted).
//   PH_ERROR   one cycle: err_en, y(n) and e(n) = d(n) - y(n) are registered.
//   PH_ADAPT   2^(N-1) cycles: upd_en with upd_addr = 0 .. 2^(N-1)-1, one
//              P-LUT word adapted per cycle; in the last one slut_update
//              advances the S-LUT to time n+1. Then back to PH_IDLE.
// An iteration therefore takes 1 + B + 1 + 2^(N-1) cycles (18 at N = 4,
// B = 8) from the load to the next possible load.
//
// The S0/S1 controls follow the document. The phase order is derived from the
// LMS data dependencies; the one-word-per-cycle adaptation schedule, the
// `enable`/`ready` handshake and the cycle counts are this design's own.
module adf_ctrl
  import da_adf_pkg::*;
#(
  parameter int unsigned N = 4,   // filter taps
  parameter int unsigned B = 8    // input sample width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enable,
  output logic         ready,
  output logic         load,
  output logic         shift,
  output logic         acc_en,
  output logic         s0,
  output logic         s1,
  output logic         err_en,
  output logic         upd_en,
  output logic [N-2:0] upd_addr,
  output logic         slut_update,
  output adf_phase_e   phase
);

  localparam int unsigned JW = (B > 1) ? $clog2(B) : 1;
  localparam logic [N-2:0] LAST_ADDR = '1;

  logic [JW-1:0] j;       // bit plane counter
  logic [N-2:0]  a;       // adaptation address counter

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= PH_IDLE;
      j     <= '0;
      a     <= '0;
    end else begin
      unique case (phase)
        PH_IDLE: begin
          j <= '0;
          a <= '0;
          if (enable) phase <= PH_FILTER;
        end
        PH_FILTER: begin
          j <= j + 1'b1;
          if (j == JW'(B - 1)) phase <= PH_ERROR;
        end
        PH_ERROR: phase <= PH_ADAPT;
        PH_ADAPT: begin
          a <= a + 1'b1;
          if (a == LAST_ADDR) phase <= PH_IDLE;
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    ready       = (phase == PH_IDLE);
    load        = ready && enable;
    shift       = (phase == PH_FILTER);
    acc_en      = shift;
    s1          = shift && (j == '0);
    s0          = shift && (j == JW'(B - 1));
    err_en      = (phase == PH_ERROR);
    upd_en      = (phase == PH_ADAPT);
    upd_addr    = a;
    slut_update = upd_en && (a == LAST_ADDR);
  end

endmodule
