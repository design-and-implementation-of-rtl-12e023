// vedic_combine: joins the four half-size products of a Vedic multiplier
// into the full product, using Kogge-Stone adders.
//
// An NxN product with a = {AH, AL}, b = {BH, BL} (halves of H = N/2 bits) is
//   a*b = hh << N  +  (hl + lh) << H  +  ll
// with hh = AH*BH, hl = AH*BL, lh = AL*BH, ll = AL*BL. The combiner follows
// the 32x32 multiplier's adder arrangement:
//   - the middle Kogge-Stone stage adds hl, lh and ll[N-1:H] into the
//     (N+1)-bit value mid (below 2^(N+1), so at most one of its two adders'
//     carries is set);
//   - p[H-1:0] = ll[H-1:0], p[N-1:H] = mid[H-1:0];
//   - the final Kogge-Stone adder gives p[2N-1:N] = hh + mid[N:H]. The
//     product fits in 2N bits, so that adder's carry out is always 0 and is
//     left unused.
// Doing the three-input middle sum as two two-input adders in a row is this
// design's choice. Interface: hh, hl, lh, ll in (N bits each); p out (2N
// bits). Purely combinational. N must be even.
module vedic_combine #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   hh,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   ll,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  // Middle (crosswise) sum: hl + lh + ll[N-1:H]
  logic [N-1:0] cross_sum, mid_lo;
  logic         cross_cout, mid_cout;
  logic [N:0]   mid;

  kogge_stone_adder #(.W(N)) u_ks_cross (
    .x(hl), .y(lh), .cin(1'b0), .sum(cross_sum), .cout(cross_cout)
  );
  kogge_stone_adder #(.W(N)) u_ks_mid (
    .x(cross_sum), .y({{H{1'b0}}, ll[N-1:H]}), .cin(1'b0),
    .sum(mid_lo), .cout(mid_cout)
  );
  assign mid = {cross_cout | mid_cout, mid_lo};

  // Upper half: hh + mid[N:H]
  logic [N-1:0] upper;
  logic         upper_cout;  // always 0, see above
  kogge_stone_adder #(.W(N)) u_ks_upper (
    .x(hh), .y({{(H-1){1'b0}}, mid[N:H]}), .cin(1'b0),
    .sum(upper), .cout(upper_cout)
  );

  assign p = {upper, mid[H-1:0], ll[H-1:0]};
endmodule
