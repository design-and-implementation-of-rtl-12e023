// tb_vedic_8x8: exhaustive self-checking test of the 8x8 Vedic multiplier.
// All 65,536 operand pairs are applied and each product is compared with
// the simulator's * operator.
module tb_vedic_8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  vedic_8x8 dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      #1;
      checks++;
      if (p != 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
