// mont_processing_stage: first stage of one Montgomery iteration.
//
// Adds the partial products of one multiplier digit to the value carried
// over from the previous cycle:  V' = V + P * q_digit.
// The carried value V arrives, and V' leaves, in carry-save form (a sum vector
// and a carry vector whose integer sum is the value), so no carry ripples
// through this stage. The AND network forms D rows (P and q_i) << i; the adder
// network is D rows of full adders (3:2 carry-save adders), each folding one
// partial-product row into the two vectors. In the first cycle of a product the
// caller feeds zero for the carried value (C = 0).
//
// Widths: the carried value is below 2**(W+1), so it fits SW = W+1 bits per
// vector; V' is below 2**(W+D+1), so the outputs are IW = W+D+1 bits, wide
// enough that no carry is ever lost. Purely combinational.
module mont_processing_stage #(
  parameter int unsigned W  = mont_fir_pkg::DATA_W,
  parameter int unsigned D  = mont_fir_pkg::DIGIT_W,
  localparam int unsigned SW = W + 1,
  localparam int unsigned IW = W + D + 1
) (
  input  logic [SW-1:0] s_in,     // carried sum vector
  input  logic [SW-1:0] c_in,     // carried carry vector
  input  logic [W-1:0]  p,        // multiplicand P
  input  logic [D-1:0]  q_digit,  // current digit of the multiplier Q
  output logic [IW-1:0] s_out,
  output logic [IW-1:0] c_out
);
  always_comb begin
    logic [IW-1:0] s, c, row, maj;
    s = IW'(s_in);
    c = IW'(c_in);
    for (int unsigned i = 0; i < D; i++) begin
      row = IW'(p & {W{q_digit[i]}}) << i;   // AND network, row i
      maj = (s & c) | (s & row) | (c & row); // adder network: full-adder carries
      s   = s ^ c ^ row;                     // full-adder sums
      c   = maj << 1;
    end
    s_out = s;
    c_out = c;
  end
endmodule
