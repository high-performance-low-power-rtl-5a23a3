// tb_astute_compressor: exhaustive check of the 12:6 compressor, all 4096
// input pairs, against (a + b) mod 64.
module tb_astute_compressor;
  localparam int unsigned W = mont_fir_pkg::DATA_W;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  astute_compressor dut (.a(a), .b(b), .y(y));

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (int'(y) != (i + j) % (1 << W)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d", i, j, y);
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
