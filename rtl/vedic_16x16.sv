// vedic_16x16: 16x16 unsigned Vedic multiplier built from four 8x8 ones.
//
// The operands are split into halves, a = {AH, AL} and b = {BH, BL}, and
// multiplied vertically and crosswise on the halves:
//   a*b = (AH*BH) << 16  +  (AH*BL + AL*BH) << 8  +  AL*BL
// The four 8x8 products come from vedic_8x8 blocks working in parallel.
// vedic_combine then adds them with Kogge-Stone adders. It uses the same
// arrangement as the 32x32 multiplier, which is this design's choice for
// this level. Interface: a, b in (16 bits); p out (32 bits).
// Purely combinational.
module vedic_16x16 (
  input  logic [15:0]  a,
  input  logic [15:0]  b,
  output logic [31:0] p
);
  logic [15:0] hh, hl, lh, ll;   // AH*BH, AH*BL, AL*BH, AL*BL

  vedic_8x8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(hh));
  vedic_8x8 u_hl (.a(a[15:8]), .b(b[7:0]),  .p(hl));
  vedic_8x8 u_lh (.a(a[7:0]),  .b(b[15:8]), .p(lh));
  vedic_8x8 u_ll (.a(a[7:0]),  .b(b[7:0]),  .p(ll));

  vedic_combine #(.N(16)) u_combine (.hh, .hl, .lh, .ll, .p);
endmodule
