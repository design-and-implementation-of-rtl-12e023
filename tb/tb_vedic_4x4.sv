// tb_vedic_4x4: exhaustive self-checking test of the 4x4 Urdhva multiplier.
// All 256 operand pairs are applied and each product is compared with the
// simulator's * operator.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a, .b, .p);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      checks++;
      if (p != 8'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d = %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
