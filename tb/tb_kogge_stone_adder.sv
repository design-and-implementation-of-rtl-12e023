// tb_kogge_stone_adder: self-checking test of the Kogge-Stone adder at its
// default width (32 bits), at 5 bits (exhaustive, a width that is not a
// power of two) and at 64 bits. Expected sums come from the simulator's +
// operator on wider numbers; corner cases carry through every bit position.
module tb_kogge_stone_adder;
  logic [31:0] x, y, sum;
  logic        cin, cout;
  logic [4:0]  x5, y5, sum5;
  logic        cin5, cout5;
  logic [63:0] x64, y64, sum64;
  logic        cin64, cout64;
  int checks = 0, failures = 0;

  kogge_stone_adder dut (.x, .y, .cin, .sum, .cout);
  kogge_stone_adder #(.W(5))  dut5  (.x(x5), .y(y5), .cin(cin5), .sum(sum5), .cout(cout5));
  kogge_stone_adder #(.W(64)) dut64 (.x(x64), .y(y64), .cin(cin64), .sum(sum64), .cout(cout64));

  task automatic check_all();
    logic [32:0] e32;
    logic [64:0] e64;
    #1;
    e32 = {1'b0, x} + {1'b0, y} + 33'(cin);
    e64 = {1'b0, x64} + {1'b0, y64} + 65'(cin64);
    checks += 2;
    if ({cout, sum} !== e32) begin
      failures++;
      $display("FAIL 32-bit x=%h y=%h cin=%0b got %0b_%h expected %h", x, y, cin, cout, sum, e32);
    end
    if ({cout64, sum64} !== e64) begin
      failures++;
      $display("FAIL 64-bit x=%h y=%h cin=%0b got %0b_%h expected %h", x64, y64, cin64, cout64, sum64, e64);
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
    for (int v = 0; v < 2048; v++) begin
      {cin5, x5, y5} = 11'(v);
      #1;
      checks++;
      if ({cout5, sum5} != 6'(int'(x5) + int'(y5) + int'(cin5))) begin
        failures++;
        $display("FAIL 5-bit x=%h y=%h cin=%0b got %0b_%h", x5, y5, cin5, cout5, sum5);
      end
    end
    x = '1; y = '0; cin = 1'b1; x64 = '1; y64 = '0; cin64 = 1'b1; check_all();
    x = '1; y = '1; cin = 1'b1; x64 = '1; y64 = '1; cin64 = 1'b1; check_all();
    x = '0; y = '0; cin = 1'b0; x64 = '0; y64 = '0; cin64 = 1'b0; check_all();
    for (int sh = 0; sh < 32; sh++) begin
      // a single carry that must travel from bit sh to the top
      x = 32'hffff_ffff << sh; y = 32'd1 << sh; cin = 1'b0;
      x64 = 64'hffff_ffff_ffff_ffff << (2*sh); y64 = 64'd1 << (2*sh); cin64 = 1'b0;
      check_all();
    end
    for (int n = 0; n < 5000; n++) begin
      x = $urandom; y = $urandom; cin = 1'($urandom);
      x64 = {$urandom, $urandom}; y64 = {$urandom, $urandom}; cin64 = 1'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
