// Offset-binary-coding (OBC) address generator of the DA filter.
//
// With OBC every bit b of an input sample stands for a signed digit
// d = +1 (b = 1) or -1 (b = 0), the sign-bit plane counting negatively. The
// P-LUT then only needs the 2^(N-1) combinations in which the newest sample's
// digit is +1, 1/2[w0 +- w1 +- ... +- w(N-1)], a '1' address bit meaning '+'.
// When the newest sample's bit A0 is 0, the wanted combination is the mirror
// image (all signs flipped) of the entry whose address is the complement of
// the other bits. Hence:
//   lut_addr bit for sample k (k = 1 .. N-1) = A_k XOR (NOT A_0),
//   with A'_1 as the most significant address bit (LUT address order A'1A'2A'3);
//   negate = (NOT A_0) XOR s0,
// where s0 marks the sign-bit cycle j = B-1 in which the whole partial sum is
// subtracted.
//
// Purely combinational. The EXOR stage against the newest sample's bit and the
// S0 control follow the document; taking the complement of A0 is what makes
// the addressing agree with the LUT table as printed (bit 1 = '+').
module obc_addr_gen #(
  parameter int unsigned N = 4   // filter taps
) (
  input  logic [N-1:0] addr_bits, // A_k = current bit of x(n-k)
  input  logic         s0,        // 1 in the sign-bit cycle
  output logic [N-2:0] lut_addr,  // A'_1 .. A'_(N-1), A'_1 = MSB
  output logic         negate     // subtract the LUT word
);

  always_comb begin
    for (int k = 1; k < N; k++) begin
      lut_addr[N-1-k] = addr_bits[k] ^ ~addr_bits[0];
    end
    negate = ~addr_bits[0] ^ s0;
  end

endmodule
