// montgomery_mult: two-cycle digit-serial Montgomery multiplier.
//
// Computes  R = P * Q * 2**(-W) mod N  for W-bit P and Q and an odd modulus N,
// reading Q one D-bit digit per clock (W = 6, D = 3: two cycles). Each cycle
// runs three stages:
//   1. processing: the digit selected by the 2:1 multiplexers is multiplied
//      by P (AND network) and added to the carried value (adder network);
//   2. division: N is added where needed and the value is halved D times;
//   3. compression: the 12:6 astute compressor adds the carry-save vectors
//      into the W-bit result (used by the last cycle).
// Between the two cycles the carry-save value is held in the carry registers
// (two (W+1)-bit vectors). In the first cycle the carried value is forced to
// zero and the low digit is selected; in the second the registers feed back
// and the high digit is selected.
//
// No final conditional subtraction of N is made: the result is congruent to
// P*Q*2**(-W) modulo N and, for P < 2**W, below P + N; the compressor keeps
// its low W bits, so for P close to 2**W and a large N the top carry can be
// lost. For the moduli the design targets (3 and 7) and typical operands the
// result is the usual partially reduced Montgomery product.
//
// Timing: pulse `start` with P, Q, N valid; keep P, Q, N stable for the next
// cycle too. `done` is high, and `result` valid (combinationally), in the
// cycle after `start`. The next `start` may come in the cycle after `done`,
// so a product can begin every second cycle. Reset clears only the control bit;
// the carry registers need no reset because the first cycle ignores them.
module montgomery_mult #(
  parameter int unsigned W  = mont_fir_pkg::DATA_W,
  parameter int unsigned D  = mont_fir_pkg::DIGIT_W,
  localparam int unsigned SW = W + 1,
  localparam int unsigned IW = W + D + 1
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous, active low
  input  logic         start,   // first cycle of a product
  input  logic [W-1:0] p,       // multiplicand P
  input  logic [W-1:0] q,       // multiplier Q, read one digit per cycle
  input  logic [W-1:0] n,       // modulus N, odd
  output logic         done,    // second cycle: result valid
  output logic [W-1:0] result,  // P*Q*2**(-W) mod N, not fully reduced
  output logic [D-1:0] u_dbg    // quotient digit of the current cycle
);
  logic          second_q;            // 1 in the second cycle of a product
  logic [SW-1:0] carry_s_q, carry_c_q; // carry registers (state between cycles)
  logic          sel_first;
  logic [D-1:0]  q_digit;
  logic [SW-1:0] st_s, st_c;
  logic [IW-1:0] pr_s, pr_c;
  logic [SW-1:0] dv_s, dv_c;

  assign sel_first = start;
  assign done      = second_q;

  digit_select_mux #(.W(W), .D(D)) u_mux (
    .q(q), .sel_first(sel_first), .digit(q_digit)
  );

  // Carried value: zero in the first cycle (C = 0), registers in the second.
  assign st_s = sel_first ? '0 : carry_s_q;
  assign st_c = sel_first ? '0 : carry_c_q;

  mont_processing_stage #(.W(W), .D(D)) u_proc (
    .s_in(st_s), .c_in(st_c), .p(p), .q_digit(q_digit), .s_out(pr_s), .c_out(pr_c)
  );

  mont_division_stage #(.W(W), .D(D)) u_div (
    .s_in(pr_s), .c_in(pr_c), .n(n), .s_out(dv_s), .c_out(dv_c), .u(u_dbg)
  );

  astute_compressor #(.W(W)) u_comp (
    .a(dv_s[W-1:0]), .b(dv_c[W-1:0]), .y(result)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) second_q <= 1'b0;
    else        second_q <= start;
  end

  always_ff @(posedge clk) begin
    if (start) begin
      carry_s_q <= dv_s;
      carry_c_q <= dv_c;
    end
  end

  initial begin
    assert (W == 2 * D)
      else $error("montgomery_mult: built for two digits, W (%0d) must be 2*D (%0d)", W, D);
  end

  // A product occupies two cycles; a start may not cut into the second.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) start |-> !second_q)
    else $error("montgomery_mult: start during the second cycle of a product");

  // N must be odd for the division stage to clear the low bit.
  a_n_odd: assert property (@(posedge clk) disable iff (!rst_n) start |-> n[0])
    else $error("montgomery_mult: even modulus N = %0d", n);
endmodule
