// dkg_adder: W-bit ripple-carry parallel adder built from reversible DKG gates.
//
// Bit i uses one dkg_gate with A tied to 0 (full-adder mode), B = x[i],
// C = y[i] and D = the carry from bit i-1 (cin for bit 0). The gate's R output
// is the carry into bit i+1 and its S output is sum bit i; the P and Q outputs
// are the gate's garbage outputs and are left unused. This chaining is the
// published 4-bit parallel adder widened to W bits; W = 64 is the width of
// the accumulate adder of the MAC.
// Interface: x, y, cin in; sum, cout out. Purely combinational; the delay is
// W carry steps.
module dkg_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   carry;
  logic [W-1:0] garbage_p;  // P outputs: copies of x, not used
  logic [W-1:0] garbage_q;  // Q outputs: copies of y, not used

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    dkg_gate u_dkg (
      .a (1'b0),
      .b (x[i]),
      .c (y[i]),
      .d (carry[i]),
      .p (garbage_p[i]),
      .q (garbage_q[i]),
      .r (carry[i+1]),
      .s (sum[i])
    );
  end

  assign cout = carry[W];
endmodule
