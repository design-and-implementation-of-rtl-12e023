// vedic_8x8: 8x8 unsigned Vedic multiplier built from four 4x4 ones.
//
// The operands are split into halves, a = {AH, AL} and b = {BH, BL}, and
// multiplied vertically and crosswise on the halves:
//   a*b = (AH*BH) << 8  +  (AH*BL + AL*BH) << 4  +  AL*BL
// The four 4x4 products come from vedic_4x4 blocks working in parallel.
// vedic_combine then adds them with Kogge-Stone adders. It uses the same
// arrangement as the 32x32 multiplier, which is this design's choice for
// this level. Interface: a, b in (8 bits); p out (16 bits).
// Purely combinational.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] hh, hl, lh, ll;   // AH*BH, AH*BL, AL*BH, AL*BL

  vedic_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(hh));
  vedic_4x4 u_hl (.a(a[7:4]), .b(b[3:0]),  .p(hl));
  vedic_4x4 u_lh (.a(a[3:0]),  .b(b[7:4]), .p(lh));
  vedic_4x4 u_ll (.a(a[3:0]),  .b(b[3:0]),  .p(ll));

  vedic_combine #(.N(8)) u_combine (.hh, .hl, .lh, .ll, .p);
endmodule
