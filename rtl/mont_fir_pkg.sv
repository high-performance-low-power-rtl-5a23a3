// mont_fir_pkg: sizes shared by the Montgomery-multiplier FIR filter.
//
// The operand width (6 bits), the digit width (3 bits, so two digits and two
// clock cycles per product) and the number of filter taps (5) follow the
// design description. All modules take these values as
// parameter defaults, so a single place sets the configuration.
package mont_fir_pkg;
  localparam int unsigned DATA_W = 6;              // m: width of P, Q, N and of every sum
  localparam int unsigned DIGIT_W = 3;             // d: multiplier bits consumed per cycle
  localparam int unsigned TAPS = 5;                // filter stages h0..h4
endpackage
