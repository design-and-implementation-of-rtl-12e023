// tb_vedic_combine: self-checking test of the partial-product combiner.
// For random and corner operands a, b the testbench computes the four
// half products AH*BH, AH*BL, AL*BH, AL*BL itself, feeds them to the
// combiner and compares its output with a*b. This is done at the default
// N = 32 and at N = 8 (exhaustive over all 8-bit operand pairs).
module tb_vedic_combine;
  logic [31:0] hh, hl, lh, ll;
  logic [63:0] p;
  logic [7:0]  hh8, hl8, lh8, ll8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  vedic_combine dut (.hh, .hl, .lh, .ll, .p);
  vedic_combine #(.N(8)) dut8 (.hh(hh8), .hl(hl8), .lh(lh8), .ll(ll8), .p(p8));

  task automatic check32(input logic [31:0] a, input logic [31:0] b);
    logic [63:0] e;
    hh = 32'(a[31:16]) * 32'(b[31:16]);
    hl = 32'(a[31:16]) * 32'(b[15:0]);
    lh = 32'(a[15:0])  * 32'(b[31:16]);
    ll = 32'(a[15:0])  * 32'(b[15:0]);
    #1;
    e = 64'(a) * 64'(b);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL N=32 %h * %h: got %h expected %h", a, b, p, e);
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
    for (int v = 0; v < 65536; v++) begin
      logic [7:0] a8, b8;
      {a8, b8} = 16'(v);
      hh8 = 8'(a8[7:4]) * 8'(b8[7:4]);
      hl8 = 8'(a8[7:4]) * 8'(b8[3:0]);
      lh8 = 8'(a8[3:0]) * 8'(b8[7:4]);
      ll8 = 8'(a8[3:0]) * 8'(b8[3:0]);
      #1;
      checks++;
      if (p8 != 16'(int'(a8) * int'(b8))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d * %0d = %0d", a8, b8, p8);
      end
    end
    check32('1, '1);
    check32(32'hffff_0000, 32'h0000_ffff);
    check32(32'hffff_ffff, 32'h0001_0001);
    for (int n = 0; n < 20000; n++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
