// vedic_32x32: 32x32 unsigned Vedic multiplier with Kogge-Stone adders.
//
// The 32-bit operands are split into 16-bit halves, a = {A31-A16, A15-A0}
// and b = {B31-B16, B15-B0}. Four 16x16 Vedic multipliers (vedic_16x16)
// form these products in parallel:
//   hh = A31-A16 * B31-B16    hl = A31-A16 * B15-B0
//   lh = A15-A0  * B31-B16    ll = A15-A0  * B15-B0
// vedic_combine joins them with Kogge-Stone adders:
//   - the middle Kogge-Stone stage adds hl, lh and bits 31-16 of ll;
//   - bits 15-0 of that sum are product bits Q31-Q16;
//   - its upper bits (31-16 plus the carry) go to the final Kogge-Stone
//     adder, which adds them to hh to give Q63-Q32;
//   - bits 15-0 of ll are Q15-Q0 directly.
// This split and adder arrangement are those of the 32x32 multiplier this
// RTL implements. Doing the three-input middle sum as two Kogge-Stone
// adders in a row is this design's choice.
// Interface: a, b in; q out. Purely combinational.
module vedic_32x32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] q
);
  logic [31:0] hh, hl, lh, ll;

  vedic_16x16 u_hh (.a(a[31:16]), .b(b[31:16]), .p(hh));
  vedic_16x16 u_hl (.a(a[31:16]), .b(b[15:0]),  .p(hl));
  vedic_16x16 u_lh (.a(a[15:0]),  .b(b[31:16]), .p(lh));
  vedic_16x16 u_ll (.a(a[15:0]),  .b(b[15:0]),  .p(ll));

  vedic_combine #(.N(32)) u_combine (.hh, .hl, .lh, .ll, .p(q));
endmodule
