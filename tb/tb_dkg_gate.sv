// tb_dkg_gate: exhaustive self-checking test of the reversible DKG gate.
// All 16 input combinations are applied. Expected outputs are worked out
// from arithmetic rather than from the gate equations: with A = 0, {R,S}
// must equal B + C + D; with A = 1, S must be the difference and R the
// borrow of B - C - D; P must copy B, and Q must copy C (A = 0) or be ~D
// (A = 1). The test also checks that the 16 output patterns are all
// different, i.e. that the gate is reversible.
module tb_dkg_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [15:0] seen;

  dkg_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b c=%0b d=%0b -> p=%0b q=%0b r=%0b s=%0b",
               what, a, b, c, d, p, q, r, s);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int diff;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      check(p == b, "P = B");
      if (!a) begin
        check(q == c, "Q = C in adder mode");
        check({r, s} == 2'(int'(b) + int'(c) + int'(d)), "full-adder sum/carry");
      end else begin
        diff = int'(b) - int'(c) - int'(d);
        check(q == !d, "Q = ~D in subtractor mode");
        check(s == diff[0], "full-subtractor difference");
        check(r == (diff < 0), "full-subtractor borrow");
      end
      check(!seen[{p, q, r, s}], "output pattern unique");
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
