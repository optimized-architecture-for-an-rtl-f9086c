// Secondary LUT (S-LUT) and register R0 of the DA LMS adaptive filter.
//
// For the weight update every P-LUT word a needs T_a(n) = 1/2 a^T x, the same
// OBC combination taken over the input samples. It is split as
//   T_a(n) = R0(n) + s_a(n),  R0(n) = 1/2 x(n),
//   s_a(n) = 1/2 sum_{k=1}^{N-1} (+x(n-k) if logical bit (N-1-k) of a is 1, else -x(n-k)).
// Both are stored doubled (r0_word = x(n), s_word = 2 s_a) so that the halves
// are only a binary point and every operation below is exact.
//
// Update from time n to n+1 (slut_update, one clock): the two words that
// differ only in the sign of the oldest sample are averaged, which removes that
// sample; R0 is then subtracted for one and added for the other, which brings
// in x(n) with '-' and '+'. Both results go back into the same two locations.
// The table is not reordered: the physical address bit that held the oldest
// sample now holds the newest one, so
//   physical address = logical address rotated left by `rot`,
// and rot advances by one per update, wrapping after N-1 updates (at which
// point the order is plain binary again). Reads take a logical address and
// rotate it here.
//
// Storage is two banks, EVEN (physical bit 0 = 0) and ODD (bit 0 = 1), of
// 2^(N-2) words each, addressed by the upper physical bits; a 2x1 mux on the
// lowest physical bit selects the read word.
//
// R0 is loaded with the new sample by r0_load. Reads are combinational; all
// writes happen at the clock edge. Synchronous reset clears R0, both banks and
// the rotation (a history of zeros). r0_load and slut_update must not be high
// in the same cycle.
//
// Follows the document: contents, in-place average-and-R0 update, circular
// address shift instead of moving data, odd/even banks with a 2x1 mux.
// Own choices: the pair for averaging is taken on the physical bit given by
// the rotation (it is the consecutive-entry pair of the document when rot = 0),
// all words updated in one clock, word widths, reset.
module s_lut #(
  parameter int unsigned N = 4,   // filter taps (N >= 3)
  parameter int unsigned B = 8    // input sample width
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          r0_load,
  input  logic signed [B-1:0]           x_new,
  input  logic [N-2:0]                  rd_addr,
  output logic signed [B+$clog2(N)-1:0] s_word,
  output logic signed [B+$clog2(N)-1:0] r0_word,
  input  logic                          slut_update,
  output logic [$clog2(N-1)-1:0]        rot
);

  localparam int unsigned L     = N - 1;         // address bits
  localparam int unsigned DEPTH = 2 ** L;        // words
  localparam int unsigned HALF  = DEPTH / 2;     // words per bank
  localparam int unsigned SW    = B + $clog2(N); // word width
  localparam int unsigned RW    = $clog2(N - 1); // rotation counter width

  logic signed [SW-1:0] even_q [HALF];
  logic signed [SW-1:0] odd_q  [HALF];
  logic signed [B-1:0]  r0;

  // physical view of both banks, and its next value
  logic signed [SW-1:0] word     [DEPTH];
  logic signed [SW-1:0] word_nxt [DEPTH];

  function automatic logic [L-1:0] rotl(input logic [L-1:0] a, input logic [RW-1:0] k);
    logic [L-1:0] r;
    for (int b = 0; b < L; b++) r[(b + int'(k)) % L] = a[b];
    return r;
  endfunction

  // read path: rotate the address, pick the bank by the lowest physical bit
  logic [L-1:0] phys;
  always_comb begin
    phys   = rotl(rd_addr, rot);
    s_word = phys[0] ? odd_q[phys[L-1:1]] : even_q[phys[L-1:1]];
  end

  assign r0_word = SW'(r0);

  // update: average each pair that differs only in physical bit `rot`, then
  // subtract (bit = 0) or add (bit = 1) R0
  always_comb begin
    logic signed [SW:0] pair_sum;
    logic [L-1:0]       mate;
    for (int i = 0; i < DEPTH; i++) begin
      word[i] = i[0] ? odd_q[i / 2] : even_q[i / 2];
    end
    for (int i = 0; i < DEPTH; i++) begin
      mate        = L'(i) ^ (L'(1) << rot);
      pair_sum    = (SW+1)'(word[i]) + (SW+1)'(word[mate]);
      word_nxt[i] = SW'(pair_sum >>> 1);
      if ((L'(i) & (L'(1) << rot)) != '0) word_nxt[i] = word_nxt[i] + r0_word;
      else                        word_nxt[i] = word_nxt[i] - r0_word;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int h = 0; h < HALF; h++) begin
        even_q[h] <= '0;
        odd_q[h]  <= '0;
      end
      r0  <= '0;
      rot <= '0;
    end else begin
      if (r0_load) r0 <= x_new;
      if (slut_update) begin
        for (int h = 0; h < HALF; h++) begin
          even_q[h] <= word_nxt[2*h];
          odd_q[h]  <= word_nxt[2*h+1];
        end
        rot <= (rot == RW'(L - 1)) ? '0 : rot + 1'b1;
      end
    end
  end

  initial begin
    assert (N >= 3) else $error("s_lut: N must be at least 3");
  end

  always_ff @(posedge clk) begin
    if (!rst) assert (!(r0_load && slut_update))
      else $error("s_lut: r0_load and slut_update in the same cycle");
  end

endmodule
