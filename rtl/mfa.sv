// mfa: modified full adder, the cell chained inside the 12:6 compressor.
//
// The modified cell is a reduced-transistor full adder: the carry is taken
// from a 2:1 selection (cout = a xor b ? cin : a) instead of a majority gate,
// and the sum reuses the same propagate term. Logically it adds the three
// input bits, {cout, sum} = a + b + cin. The transistor-level cell this
// models is said to misbehave electrically for the input pattern 1-0-1; at
// gate level that is not reproduced here, and the multiplier it sits in is
// specified to give exact results, so the cell is exact for all eight input
// combinations. Purely combinational.
module mfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic prop;
  always_comb begin
    prop = a ^ b;
    sum  = prop ^ cin;
    cout = prop ? cin : a;
  end
endmodule
