// digit_select_mux: picks the multiplier digit that the current cycle consumes.
//
// The Montgomery multiplier reads its second operand Q one D-bit digit per
// cycle. For the two-digit configuration (W = 6, D = 3) this is a row of D
// 2:1 multiplexers, one per digit bit: when `sel_first` is high the low digit
// (q0, q1, q2) passes, when it is low the high digit (q3, q4, q5) passes, the
// polarity the design description gives. Purely combinational. The module is
// written for exactly two digits (W = 2*D), the configuration it describes.
module digit_select_mux #(
  parameter int unsigned W = mont_fir_pkg::DATA_W,
  parameter int unsigned D = mont_fir_pkg::DIGIT_W
) (
  input  logic [W-1:0] q,          // full multiplier operand
  input  logic         sel_first,  // 1: first cycle, low digit; 0: second cycle, high digit
  output logic [D-1:0] digit
);
  always_comb begin
    for (int unsigned i = 0; i < D; i++) begin
      digit[i] = sel_first ? q[i] : q[D + i];
    end
  end

  initial begin
    assert (W == 2 * D)
      else $error("digit_select_mux: W (%0d) must be twice D (%0d)", W, D);
  end
endmodule
