// Input register bank of the DA filter: the N most recent input samples
// x(n) .. x(n-N+1), newest in register 0 ("top"), oldest in register N-1.
//
// The DA filter consumes the samples one bit plane at a time, LSB first.
// Each register is a B-bit circular shift register: `shift` rotates all of
// them right by one bit, so addr_bits[k] (the LSB of register k, the address
// line A_k of the LUT) walks through bits 0 .. B-1 of x(n-k). After exactly B
// shifts every sample is back in its original orientation, ready for the next
// output. `load` (only issued in that rest orientation) pushes x_in into
// register 0 and moves every older sample down one register; the oldest
// sample drops out.
//
// Timing: both operations take effect at the clock edge; addr_bits is read
// directly from the registers. `load` has priority over
// `shift`. Synchronous reset clears all samples.
//
// The chain order and the LSB-first address lines follow the document; the
// rotate-to-restore form of the shift registers and the reset are this
// design's own choice.
module input_reg_bank #(
  parameter int unsigned N = 4,  // filter taps
  parameter int unsigned B = 8   // input sample width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         shift,
  input  logic [B-1:0] x_in,
  output logic [N-1:0] addr_bits
);

  logic [B-1:0] xr [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) xr[k] <= '0;
    end else if (load) begin
      xr[0] <= x_in;
      for (int k = 1; k < N; k++) xr[k] <= xr[k-1];
    end else if (shift) begin
      for (int k = 0; k < N; k++) xr[k] <= {xr[k][0], xr[k][B-1:1]};
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) addr_bits[k] = xr[k][0];
  end

endmodule
