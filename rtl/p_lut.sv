// Primary LUT (P-LUT) of the DA LMS adaptive filter, with the P_initial register.
//
// Word a (a = 0 .. 2^(N-1)-1) holds the OBC combination of the current weights
//   Q_a = w0 + sum_{k=1}^{N-1} (+w_k if bit (N-1-k) of a is 1, else -w_k),
// scaled as Q_a = 2^(FRAC+1) * P_a, i.e. the "1/2" of the combination is one
// extra fractional bit and the weights carry FRAC fractional bits. Address 0
// is w0-w1-...; the last address is w0+w1+...+w(N-1).
//
// Ports: one asynchronous read port (rd_addr -> rd_data) used by the bit-serial
// filter, and one read-modify-write port that adds upd_delta to word upd_addr
// at the clock edge when upd_en is high. Instead of recomputing the table from
// the weights, the LMS update is applied to the words themselves (each word is
// a linear combination of the weights, so it moves by mu*e*T_a).
// P_initial = -1/2 sum w_i is kept in its own register and rewritten, with the
// negated new value, whenever the last word is written.
//
// The word contents, the direct adaptation of the words and the P_initial
// register follow the document. Flip-flop storage, the word width PW, reset to
// all-zero weights and wrap-around arithmetic are this design's own choices.
module p_lut #(
  parameter int unsigned N  = 4,   // filter taps
  parameter int unsigned PW = 16   // word width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-2:0]         rd_addr,
  output logic signed [PW-1:0] rd_data,
  input  logic                 upd_en,
  input  logic [N-2:0]         upd_addr,
  input  logic signed [PW-1:0] upd_delta,
  output logic signed [PW-1:0] p_initial
);

  localparam int unsigned DEPTH = 2 ** (N - 1);
  localparam logic [N-2:0] LAST = '1;

  logic signed [PW-1:0] q [DEPTH];
  logic signed [PW-1:0] q_new;

  assign q_new = q[upd_addr] + upd_delta;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < DEPTH; a++) q[a] <= '0;
      p_initial <= '0;
    end else if (upd_en) begin
      q[upd_addr] <= q_new;
      if (upd_addr == LAST) p_initial <= -q_new;
    end
  end

  assign rd_data = q[rd_addr];

endmodule
