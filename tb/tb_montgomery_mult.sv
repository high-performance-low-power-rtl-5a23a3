// tb_montgomery_mult: self-checking test of the two-cycle Montgomery multiplier.
//
// Runs every (P, Q) pair for N = 3 and N = 7, the moduli the design targets,
// and random pairs for other odd N. Each result is compared with the
// whole-digit reference model, and, where the reference does not exceed W
// bits, also with the defining congruence R == P*Q*2**-6 (mod N). Products are
// issued back to back (start every second cycle); `done` must rise exactly one
// cycle after `start`, i.e. two cycles per product.
module tb_montgomery_mult;
  import mont_ref_pkg::*;
  localparam int unsigned W = mont_fir_pkg::DATA_W;
  localparam int unsigned D = mont_fir_pkg::DIGIT_W;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [W-1:0] p, q, n, result;
  logic [D-1:0] u_dbg;
  int checks = 0, failures = 0;
  int unreduced = 0;

  montgomery_mult dut (.*);

  always #5 clk = ~clk;

  task automatic one(input int unsigned pp, qq, nn);
    int unsigned exp, full;
    @(negedge clk);
    p = W'(pp); q = W'(qq); n = W'(nn); start = 1;
    #1;
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done high in first cycle");
    end
    @(negedge clk);
    start = 0;
    #1;
    exp  = mont_ref(pp, qq, nn, W, D);
    full = mont_full(pp, qq, nn, W, D);
    checks++;
    if (!done || int'(result) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL P=%0d Q=%0d N=%0d -> %0d done=%0d (exp %0d)",
                                  pp, qq, nn, result, done, exp);
    end
    if (full < (1 << W) && nn > 1) begin
      checks++;
      if (int'(result) % nn != (pp * qq % nn) * inv_pow2_mod(W, nn) % nn) begin
        failures++;
        if (failures < 10) $display("FAIL congruence P=%0d Q=%0d N=%0d -> %0d", pp, qq, nn, result);
      end
    end
    if (exp >= nn) unreduced++;
  endtask

  initial begin
    int unsigned nn;
    p = 0; q = 0; n = 7;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (nn_list[k]) begin
      for (int i = 0; i < (1 << W); i++)
        for (int j = 0; j < (1 << W); j++)
          one(i, j, nn_list[k]);
    end
    for (int k = 0; k < 3000; k++) begin
      nn = 2 * $urandom_range((1 << (W - 1)) - 1) + 1;
      one($urandom_range((1 << W) - 1), $urandom_range((1 << W) - 1), nn);
    end
    // The document's example operands: x = 10 with coefficients 5..1, N = 7.
    for (int h = 1; h <= 5; h++) one(10, h, 7);
    @(negedge clk);
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done stays high");
    end
    checks++;
    if (unreduced == 0) begin
      failures++;
      $display("FAIL no partially reduced result was seen");
    end
    $display("partially reduced results (>= N): %0d", unreduced);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned nn_list [2] = '{3, 7};

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
