// tb_vedic_32x32: self-checking test of the 32x32 Vedic multiplier.
// Corner operands (0, 1, all ones, single high bits, values whose cross
// products carry into the upper half) and random operands are applied; each
// 64-bit product is compared with the simulator's * operator.
module tb_vedic_32x32;
  logic [31:0] a, b;
  logic [63:0] q;
  int checks = 0, failures = 0;

  vedic_32x32 dut (.a, .b, .q);

  task automatic check();
    logic [63:0] e;
    #1;
    e = 64'(a) * 64'(b);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %h * %h = %h expected %h", a, b, q, e);
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
    a = 32'd1; b = 32'hdead_beef; check();
    a = 32'h8000_0000; b = 32'h8000_0000; check();
    a = 32'h0000_ffff; b = 32'hffff_0000; check();
    a = 32'hffff_ffff; b = 32'h0001_0001; check();
    a = 32'd4; b = 32'd5; check();
    for (int n = 0; n < 50000; n++) begin
      a = $urandom; b = $urandom;
      if (n % 4 == 1) a = a | 32'hffff_0000;
      if (n % 4 == 2) b = b | 32'h0000_ffff;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
