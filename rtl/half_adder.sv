// half_adder: one-bit half adder, sum = a xor b, carry = a and b.
//
// Purely combinational. Used as the first (least significant) cell of the
// 12:6 compressor and of the carry-forward adder, where there is no incoming
// carry.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
