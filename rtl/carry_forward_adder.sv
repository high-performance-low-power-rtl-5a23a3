// carry_forward_adder: W-bit ripple adder that sums two filter terms.
//
// One adder sits between every pair of neighbouring filter taps: it adds a
// multiplier output to the delay register coming from the next tap. As the
// design description gives it, the chain is a half adder in bit 0 followed by
// full adders, each carry passed on to the next cell, and the result keeps the
// operand width W: the filter arithmetic is modulo 2**W. The carry out of the
// top cell is brought out as `ovf` so that a user (and the testbenches) can see
// when a sum wrapped. Purely combinational.
module carry_forward_adder #(
  parameter int unsigned W = mont_fir_pkg::DATA_W
) (
  input  logic [W-1:0] a,    // multiplier output
  input  logic [W-1:0] b,    // delay register output
  output logic [W-1:0] y,    // (a + b) mod 2**W
  output logic         ovf   // carry out of bit W-1 (the sum wrapped)
);
  logic [W-1:0] carry;

  half_adder u_ha (.a(a[0]), .b(b[0]), .sum(y[0]), .carry(carry[0]));

  for (genvar i = 1; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(carry[i-1]), .sum(y[i]), .cout(carry[i]));
  end

  assign ovf = carry[W-1];
endmodule
