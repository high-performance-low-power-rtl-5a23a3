// tb_mont_division_stage: random carry-save values V (with V + 7*N below
// 2**(W+D+1)) and odd moduli; expects u = -V * N^-1 mod 8 and an output
// whose vectors sum to (V + u*N) / 8.
module tb_mont_division_stage;
  import mont_ref_pkg::*;
  localparam int unsigned W = mont_fir_pkg::DATA_W;
  localparam int unsigned D = mont_fir_pkg::DIGIT_W;
  localparam int unsigned SW = W + 1, IW = W + D + 1;
  logic [IW-1:0] s_in, c_in;
  logic [W-1:0] n;
  logic [SW-1:0] s_out, c_out;
  logic [D-1:0] u;
  int checks = 0, failures = 0;

  mont_division_stage dut (.*);

  initial begin
    int unsigned v, sv, nn, ue, r;
    r = 1 << D;
    for (int k = 0; k < 4000; k++) begin
      nn = (k < 1000) ? 3 : (k < 2000) ? 7 : 2 * $urandom_range((1 << (W - 1)) - 1) + 1;
      v  = $urandom_range((1 << IW) - 1 - (r - 1) * nn);
      sv = $urandom_range(v);
      s_in = IW'(sv);
      c_in = IW'(v - sv);
      n = W'(nn);
      #1;
      ue = ((r - v % r) % r) * inv_mod_pow2(nn, D) % r;
      checks++;
      if (int'(u) != ue || int'(s_out) + int'(c_out) != (v + ue * nn) / r) begin
        failures++;
        if (failures < 10)
          $display("FAIL v=%0d n=%0d -> u=%0d (exp %0d) value=%0d (exp %0d)", v, nn, u, ue,
                   int'(s_out) + int'(c_out), (v + ue * nn) / r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
