// mont_division_stage: second stage of one Montgomery iteration.
//
// Divides the value from the processing stage by 2**D modulo N, one bit at a
// time, D times: if the value is odd, N is added (which makes it even, N being
// odd), then the value is halved. This is the array of full adders that take
// the bits of N as one input. The quotient bits u (1 where N was added) are
// brought out for observation. The result is
//   V'' = (V' + u*N) / 2**D,   u = -V' / N mod 2**D.
// Input and output are in carry-save form. Since the bit-0 carry entry of every
// row is zero and the sum bit 0 becomes zero after adding N, both vectors are
// even before each halving, so shifting each vector right keeps their sum exact.
// For V' < 2**(W+D+1) and N < 2**W the result is below 2**(W+1) and fits the
// SW = W+1 bit state vectors. Purely combinational.
module mont_division_stage #(
  parameter int unsigned W  = mont_fir_pkg::DATA_W,
  parameter int unsigned D  = mont_fir_pkg::DIGIT_W,
  localparam int unsigned SW = W + 1,
  localparam int unsigned IW = W + D + 1
) (
  input  logic [IW-1:0] s_in,
  input  logic [IW-1:0] c_in,
  input  logic [W-1:0]  n,      // modulus N, odd
  output logic [SW-1:0] s_out,  // new state, sum vector (bits C0..CW)
  output logic [SW-1:0] c_out,  // new state, carry vector
  output logic [D-1:0]  u       // 1 where N was added, LSB first
);
  always_comb begin
    logic [IW-1:0] s, c, row, maj;
    s = s_in;
    c = c_in;
    u = '0;
    for (int unsigned j = 0; j < D; j++) begin
      u[j] = s[0] ^ c[0];                     // value odd?
      row  = IW'(n & {W{u[j]}});
      maj  = (s & c) | (s & row) | (c & row);
      s    = (s ^ c ^ row) >> 1;              // halve: bit 0 is zero here
      c    = (maj << 1) >> 1;                 // carries, then halved
    end
    s_out = s[SW-1:0];
    c_out = c[SW-1:0];
  end
endmodule
