// tb_dkg_adder: self-checking test of the DKG-gate ripple-carry adder at its
// default width (64 bits) and at 4 bits. The 4-bit instance is tested
// exhaustively (all x, y and cin); the 64-bit one with corner values
// (all ones, carry through every bit) and random operands. Expected results
// come from the simulator's own + operator on wider numbers.
module tb_dkg_adder;
  localparam int unsigned W = 64;
  logic [W-1:0] x, y, sum;
  logic         cin, cout;
  logic [3:0]   x4, y4, sum4;
  logic         cin4, cout4;
  int checks = 0, failures = 0;

  dkg_adder dut (.x, .y, .cin, .sum, .cout);
  dkg_adder #(.W(4)) dut4 (.x(x4), .y(y4), .cin(cin4), .sum(sum4), .cout(cout4));

  task automatic check64();
    logic [W:0] expect_v;
    #1;
    expect_v = {1'b0, x} + {1'b0, y} + (W+1)'(cin);
    checks++;
    if ({cout, sum} !== expect_v) begin
      failures++;
      $display("FAIL x=%h y=%h cin=%0b got %0b_%h expected %h", x, y, cin, cout, sum, expect_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin4, x4, y4} = 9'(v);
      #1;
      checks++;
      if ({cout4, sum4} != 5'(int'(x4) + int'(y4) + int'(cin4))) begin
        failures++;
        $display("FAIL 4-bit x=%h y=%h cin=%0b got %0b_%h", x4, y4, cin4, cout4, sum4);
      end
    end
    x = '1; y = '0; cin = 1'b1; check64();
    x = '1; y = '1; cin = 1'b1; check64();
    x = '0; y = '0; cin = 1'b0; check64();
    x = 64'h5555_5555_5555_5555; y = 64'haaaa_aaaa_aaaa_aaab; cin = 1'b0; check64();
    for (int n = 0; n < 5000; n++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      cin = 1'($urandom);
      check64();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
