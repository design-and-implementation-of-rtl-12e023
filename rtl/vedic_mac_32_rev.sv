// vedic_mac_32_rev: 32-bit multiply-accumulate (MAC) unit built from a
// Vedic multiplier and a reversible-logic adder.
//
// Datapath: a and b (32 bits each) go to vedic_32x32, an Urdhva Tiryakbhyam
// multiplier with Kogge-Stone adders, whose 64-bit product goes to
// accumulator_64bit, where a DKG-gate adder adds it to the 64-bit running
// sum held in a register. The register output is c and feeds back into the
// adder. Structure and port names follow the MAC's block diagram and RTL
// schematic.
// Timing: on each rising edge of clk, clr = 1 clears c; otherwise en = 1
// adds a*b to c (modulo 2^64) and en = 0 holds it. The multiply and add are
// one combinational path between the inputs and the register, so a result
// is visible one edge after its operands. The synchronous clear, its
// priority over en and the wrap-around are this design's choices.
module vedic_mac_32_rev
  import mac_pkg::*;
(
  input  logic                 clk,
  input  logic                 clr,
  input  logic                 en,
  input  logic [OPERAND_W-1:0] a,
  input  logic [OPERAND_W-1:0] b,
  output logic [PRODUCT_W-1:0] c
);
  logic [PRODUCT_W-1:0] product;

  vedic_32x32 q1 (.a(a), .b(b), .q(product));

  accumulator_64bit q2 (
    .clk(clk), .clr(clr), .en(en), .product(product), .c(c)
  );
endmodule
