// accumulator_64bit: 64-bit accumulate stage of the MAC.
//
// A 64-bit register c holds the running sum. A dkg_adder (reversible DKG
// ripple-carry adder) adds the incoming product to c, and on each rising
// clock edge:
//   clr = 1           -> c <= 0
//   clr = 0, en = 1   -> c <= c + product   (modulo 2^64)
//   clr = 0, en = 0   -> c holds
// The register, adder and feedback follow the MAC architecture; the port
// names follow its RTL schematic. That clr is synchronous and wins over en,
// and that a sum past 2^64 wraps (the adder's carry out is dropped), are
// this design's choices. Interface: product, clk, clr, en in; c out.
// Latency: c shows a product one clock edge after it is presented with en.
module accumulator_64bit
  import mac_pkg::*;
(
  input  logic                 clk,
  input  logic                 clr,
  input  logic                 en,
  input  logic [PRODUCT_W-1:0] product,
  output logic [PRODUCT_W-1:0] c
);
  logic [PRODUCT_W-1:0] next_sum;
  logic                 carry_out;  // dropped: the accumulator wraps

  dkg_adder #(.W(PRODUCT_W)) u_adder (
    .x(c), .y(product), .cin(1'b0), .sum(next_sum), .cout(carry_out)
  );

  always_ff @(posedge clk) begin
    if (clr)     c <= '0;
    else if (en) c <= next_sum;
  end
endmodule
