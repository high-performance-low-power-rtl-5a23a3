// mont_fir_filter: five-stage transposed-form FIR filter built on Montgomery
// multipliers.
//
//   y(n) = h0 (x) x(n) + h1 (x) x(n-1) + ... + h4 (x) x(n-4)   (mod 2**W)
//
// where a (x) b is the Montgomery product x * h * 2**(-W) mod N of one
// montgomery_mult, and + is a W-bit carry-forward adder whose top carry is
// dropped. Every tap has its own multiplier; all of them multiply the same
// input sample x(n) by their coefficient. The products are combined in
// transposed form: a delay register z_k sits between neighbouring adders,
//   z_(K-1) <= p_(K-1),   z_k <= p_k + z_(k+1),   y <= p_0 + z_1,
// so each adder sees one multiplier output and one register output, and the
// longest combinational path holds a single adder. The filter output is the
// output of the last adder (tap 0), registered.
//
// Following the design description: five taps, 6-bit data, coefficients and
// sums, Montgomery multipliers with the 12:6 compressor, carry-forward adders
// and D-flip-flops between them. Choices made here: the sample x is the
// multiplicand P and the coefficient the multiplier Q; N is a port shared by
// all taps; a valid/ready handshake with an input register; the output
// register; an asynchronous active-low reset clearing the control and delay
// registers; `ovf_any` exposes the wrap of any adder.
//
// Timing: a sample is accepted when x_valid and x_ready are both high. The
// multipliers start in the next cycle and finish one cycle later, when the
// delay registers and y are loaded; y_valid is high for one cycle after that.
// A sample is accepted at most every second cycle (x_ready is low while the
// multipliers run their first cycle), so a sample accepted in cycle t gives
// y_valid in cycle t+3. Coefficients and N must stay stable while a sample is
// processed.
module mont_fir_filter
  import mont_fir_pkg::*;
#(
  parameter int unsigned W    = DATA_W,
  parameter int unsigned D    = DIGIT_W,
  parameter int unsigned NTAP = TAPS
) (
  input  logic         clk,
  input  logic         rst_n,            // asynchronous, active low
  input  logic         x_valid,
  output logic         x_ready,
  input  logic [W-1:0] x,                // input sample
  input  logic [W-1:0] h [NTAP],         // coefficients h0..h(NTAP-1)
  input  logic [W-1:0] n,                // Montgomery modulus, odd (3 or 7)
  output logic         y_valid,
  output logic [W-1:0] y,                // filter output
  output logic         ovf_any           // some adder wrapped in the last update
);
  logic         go_q;                 // multipliers in their first cycle
  logic [W-1:0] x_q;                  // sample being processed
  logic [W-1:0] prod [NTAP];          // multiplier outputs
  logic [NTAP-1:0] mdone;
  logic [W-1:0] z_q [NTAP];           // z_q[k] feeds the adder of tap k-1; z_q[0] unused
  logic [W-1:0] sum [NTAP];           // adder outputs: sum[k] = prod[k] + z_q[k+1]
  logic [NTAP-1:0] ovf;
  logic         upd;                  // products ready: shift the delay line

  assign x_ready = !go_q;
  assign upd     = &mdone;           // all taps finish in the same cycle

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) go_q <= 1'b0;
    else        go_q <= x_valid && x_ready;
  end

  always_ff @(posedge clk) begin
    if (x_valid && x_ready) x_q <= x;
  end

  for (genvar k = 0; k < NTAP; k++) begin : g_tap
    montgomery_mult #(.W(W), .D(D)) u_mul (
      .clk(clk), .rst_n(rst_n), .start(go_q),
      .p(x_q), .q(h[k]), .n(n),
      .done(mdone[k]), .result(prod[k]), .u_dbg()
    );

    if (k == NTAP - 1) begin : g_last
      // The far end of the chain has no adder: its register takes the product.
      assign sum[k] = prod[k];
      assign ovf[k] = 1'b0;
    end else begin : g_add
      carry_forward_adder #(.W(W)) u_add (
        .a(prod[k]), .b(z_q[k+1]), .y(sum[k]), .ovf(ovf[k])
      );
    end

    if (k > 0) begin : g_z
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)   z_q[k] <= '0;
        else if (upd) z_q[k] <= sum[k];
      end
    end else begin : g_z0
      assign z_q[0] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
      ovf_any <= 1'b0;
    end else begin
      y_valid <= upd;
      if (upd) begin
        y       <= sum[0];
        ovf_any <= |ovf;
      end
    end
  end

  initial begin
    assert (NTAP >= 2) else $error("mont_fir_filter: NTAP must be at least 2");
  end
endmodule
