// tb_mont_processing_stage: checks that the carry-save output sums to
// carried value + P * digit, for every P and digit and random carried vectors
// (both below 2**(W+1), their sum as well, as in the multiplier).
module tb_mont_processing_stage;
  localparam int unsigned W = mont_fir_pkg::DATA_W;
  localparam int unsigned D = mont_fir_pkg::DIGIT_W;
  localparam int unsigned SW = W + 1, IW = W + D + 1;
  logic [SW-1:0] s_in, c_in;
  logic [W-1:0] p;
  logic [D-1:0] q_digit;
  logic [IW-1:0] s_out, c_out;
  int checks = 0, failures = 0;

  mont_processing_stage dut (.*);

  initial begin
    int unsigned v, sv;
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << D); j++) begin
        for (int r = 0; r < 4; r++) begin
          v  = (r == 0) ? 0 : $urandom_range((1 << SW) - 1);
          sv = $urandom_range(v);
          s_in = SW'(sv);
          c_in = SW'(v - sv);
          p = W'(i);
          q_digit = D'(j);
          #1;
          checks++;
          if (int'(s_out) + int'(c_out) != v + i * j) begin
            failures++;
            if (failures < 10)
              $display("FAIL v=%0d p=%0d q=%0d -> %0d+%0d", v, i, j, s_out, c_out);
          end
        end
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
