// tb_digit_select_mux: exhaustive check of the digit multiplexers: select
// high gives q[2:0], select low gives q[5:3].
module tb_digit_select_mux;
  localparam int unsigned W = mont_fir_pkg::DATA_W;
  localparam int unsigned D = mont_fir_pkg::DIGIT_W;
  logic [W-1:0] q;
  logic sel_first;
  logic [D-1:0] digit;
  int checks = 0, failures = 0;

  digit_select_mux dut (.q(q), .sel_first(sel_first), .digit(digit));

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int s = 0; s < 2; s++) begin
        q = W'(i);
        sel_first = 1'(s);
        #1;
        checks++;
        if (int'(digit) != (s ? i % 8 : i / 8)) begin
          failures++;
          $display("FAIL q=%0d sel=%0d -> %0d", i, s, digit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
