// tb_accumulator_64bit: self-checking test of the 64-bit accumulate stage.
// Inputs change on the falling clock edge; after every rising edge the
// register output c is compared with a reference model kept in the
// testbench (clear, add modulo 2^64, or hold). The sequence starts with a
// clear, then runs random products with random en and occasional clr, and
// includes sums that pass 2^64 so the wrap-around is exercised. The check
// also confirms the one-edge latency: c must change on the very edge
// after en is set.
module tb_accumulator_64bit;
  logic        clk = 1'b0;
  logic        clr, en;
  logic [63:0] product, c, model;
  int checks = 0, failures = 0;
  int n_clear = 0, n_add = 0, n_hold = 0, n_wrap = 0;

  accumulator_64bit dut (.clk, .clr, .en, .product, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic clr_i, input logic en_i, input logic [63:0] prod_i);
    @(negedge clk);
    clr = clr_i; en = en_i; product = prod_i;
    @(posedge clk);
    if (clr_i) begin
      model = '0; n_clear++;
    end else if (en_i) begin
      if (model + prod_i < model) n_wrap++;
      model = model + prod_i; n_add++;
    end else begin
      n_hold++;
    end
    #1;
    checks++;
    if (c !== model) begin
      failures++;
      $display("FAIL clr=%0b en=%0b product=%h: c=%h expected %h", clr_i, en_i, prod_i, c, model);
    end
  endtask

  initial begin
    model = '0;
    step(1'b1, 1'b0, 64'd0);
    step(1'b1, 1'b1, 64'd123);          // clr wins over en
    for (int n = 0; n < 13; n++) step(1'b0, 1'b1, 64'd20);
    step(1'b0, 1'b0, 64'd999);           // hold
    step(1'b0, 1'b1, 64'hffff_ffff_ffff_fff0);  // wraps past 2^64
    for (int n = 0; n < 5000; n++) begin
      step(($urandom % 50) == 0, ($urandom % 4) != 0, {$urandom, $urandom});
    end
    checks++;
    if (n_clear == 0 || n_add == 0 || n_hold == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mode never happened: clear=%0d add=%0d hold=%0d wrap=%0d",
               n_clear, n_add, n_hold, n_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
