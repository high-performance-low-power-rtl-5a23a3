// full_adder: one-bit full adder, {cout, sum} = a + b + cin.
//
// Purely combinational, written as the usual xor / majority pair. It is the
// cell of the carry-forward adder that sums the filter taps.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end
endmodule
