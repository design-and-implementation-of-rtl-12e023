// mac_pkg: widths shared by the 32-bit multiply-accumulate unit.
// The MAC multiplies two 32-bit operands into a 64-bit product and keeps a
// 64-bit running sum, as the architecture this RTL implements specifies.
package mac_pkg;
  localparam int unsigned OPERAND_W = 32;             // multiplicand / multiplier width
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;  // product and accumulator width
endpackage
