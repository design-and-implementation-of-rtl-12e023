// tb_vedic_16x16: self-checking test of the 16x16 Vedic multiplier.
// Corner operands (0, 1, all ones, single high bits, one full half) and
// 50,000 random operand pairs are applied; each product is compared with
// the simulator's * operator.
module tb_vedic_16x16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  vedic_16x16 dut (.a, .b, .p);

  task automatic check();
    logic [31:0] e;
    #1;
    e = 32'(a) * 32'(b);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h expected %h", a, b, p, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '1; check();
    a = '0; b = '1; check();
    a = 16'd1; b = 16'hbeef; check();
    a = 16'h8000; b = 16'h8000; check();
    a = 16'h00ff; b = 16'hff00; check();
    a = 16'hffff; b = 16'h0101; check();
    for (int n = 0; n < 50000; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
