// tb_vedic_mac_32_rev: end-to-end test of the 32-bit MAC at its default
// size.
// Part 1 replays the reference run of the design: clr is held, then
// released with a = 4, b = 5 and en = 1, and c must read 20, 40, 60, ...
// 260 on successive rising edges (one product per clock, one-edge latency).
// Part 2 runs random operands with random en and occasional clr, including
// full-scale operands so the 64-bit sum wraps; after every edge c is
// compared with a reference model built on the simulator's * and +.
// Each mechanism of the design (clear, accumulate, hold with en low, clear
// taking priority over en, wrap past 2^64) is counted, and one that never
// happened counts as a failure.
module tb_vedic_mac_32_rev;
  logic        clk = 1'b0;
  logic        clr, en;
  logic [31:0] a, b;
  logic [63:0] c, model;
  int checks = 0, failures = 0;
  int n_clear = 0, n_add = 0, n_hold = 0, n_clr_over_en = 0, n_wrap = 0;

  vedic_mac_32_rev dut (.clk, .clr, .en, .a, .b, .c);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one set of inputs for one clock and check c after the edge.
  task automatic step(input logic clr_i, input logic en_i,
                      input logic [31:0] a_i, input logic [31:0] b_i);
    logic [63:0] prod;
    @(negedge clk);
    clr = clr_i; en = en_i; a = a_i; b = b_i;
    @(posedge clk);
    prod = 64'(a_i) * 64'(b_i);
    if (clr_i) begin
      model = '0; n_clear++;
      if (en_i) n_clr_over_en++;
    end else if (en_i) begin
      if (model + prod < model) n_wrap++;
      model = model + prod; n_add++;
    end else begin
      n_hold++;
    end
    #1;
    checks++;
    if (c !== model) begin
      failures++;
      $display("FAIL clr=%0b en=%0b a=%h b=%h: c=%h expected %h",
               clr_i, en_i, a_i, b_i, c, model);
    end
  endtask

  initial begin
    int cycles;
    model = '0;
    // Part 1: reference run, a = 4, b = 5
    step(1'b1, 1'b1, 32'd0, 32'd0);
    step(1'b1, 1'b1, 32'd4, 32'd5);
    for (int n = 1; n <= 13; n++) begin
      step(1'b0, 1'b1, 32'd4, 32'd5);
      checks++;
      if (c != 64'(20 * n)) begin
        failures++;
        $display("FAIL reference run: after %0d edges c=%0d expected %0d", n, c, 20 * n);
      end
    end
    // Part 2: random operation, with full-scale bursts that wrap the sum
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] ra, rb;
      ra = $urandom; rb = $urandom;
      if ((n / 500) % 2 == 1) begin ra = ra | 32'hff00_0000; rb = rb | 32'hff00_0000; end
      step(($urandom % 64) == 0, ($urandom % 5) != 0, ra, rb);
    end
    checks++;
    if (n_clear == 0 || n_add == 0 || n_hold == 0 || n_clr_over_en == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: clear=%0d accumulate=%0d hold=%0d clear_over_enable=%0d wrap=%0d",
             n_clear, n_add, n_hold, n_clr_over_en, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
