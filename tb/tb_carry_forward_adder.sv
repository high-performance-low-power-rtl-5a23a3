// tb_carry_forward_adder: exhaustive check of the 6-bit filter adder, all
// 4096 input pairs: y = (a + b) mod 64 and ovf = carry out of bit 5.
module tb_carry_forward_adder;
  localparam int unsigned W = mont_fir_pkg::DATA_W;
  logic [W-1:0] a, b, y;
  logic ovf;
  int checks = 0, failures = 0;

  carry_forward_adder dut (.a(a), .b(b), .y(y), .ovf(ovf));

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (int'(y) != (i + j) % (1 << W) || ovf != (i + j >= (1 << W))) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d -> %0d ovf=%0d", i, j, y, ovf);
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
