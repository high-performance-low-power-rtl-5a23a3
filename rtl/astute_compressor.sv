// astute_compressor: the 12:6 compressor that closes the Montgomery multiplier.
//
// The multiplier keeps its running value in carry-save form, two vectors whose
// sum is the result. This block turns the low W bits of both vectors (2*W = 12
// input bits for W = 6) into a single W-bit binary word. It is a ripple chain:
// a half adder in bit 0 and a modified full adder (mfa) in every higher bit,
// each passing its carry to the next. The carry out of the top cell is dropped,
// so the output is (a + b) mod 2**W, as the design description specifies for
// its 6-bit result. Purely combinational; the delay is one half adder plus
// W-1 carry hops.
module astute_compressor #(
  parameter int unsigned W = mont_fir_pkg::DATA_W
) (
  input  logic [W-1:0] a,   // sum vector bits C0..C(W-1)
  input  logic [W-1:0] b,   // carry vector bits of the same weights
  output logic [W-1:0] y    // (a + b) mod 2**W
);
  logic [W-1:0] carry;

  half_adder u_ha (.a(a[0]), .b(b[0]), .sum(y[0]), .carry(carry[0]));

  for (genvar i = 1; i < W; i++) begin : g_mfa
    mfa u_mfa (.a(a[i]), .b(b[i]), .cin(carry[i-1]), .sum(y[i]), .cout(carry[i]));
  end
  // carry[W-1] is the discarded final carry.
endmodule
