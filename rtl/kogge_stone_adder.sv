// kogge_stone_adder: W-bit parallel-prefix adder with the Kogge-Stone network.
//
// Bit i first forms generate g = x & y and propagate p = x ^ y. The carry-in
// is folded into bit 0's generate. Then ceil(log2 W) prefix stages follow; in
// stage k every bit i >= 2^k combines its (G, P) pair with that of bit i-2^k:
//   G = G_i | P_i & G_(i-2^k),  P = P_i & P_(i-2^k)
// and the remaining bits pass theirs through. After the last stage G_i is the
// carry out of bit i, so sum_i = p_i ^ G_(i-1) (cin for bit 0). Every node
// drives at most two others, and the depth is log2 W, which is what makes the
// adder fast. Interface: x, y, cin in; sum, cout out. Purely combinational.
module kogge_stone_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned STAGES = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] pg_p;                  // bitwise propagate
  logic [W-1:0] gen [STAGES+1];        // group generate after each stage
  logic [W-1:0] prop [STAGES+1];       // group propagate after each stage

  assign pg_p    = x ^ y;
  assign prop[0] = pg_p;
  assign gen[0]  = {x[W-1:1] & y[W-1:1], (x[0] & y[0]) | (pg_p[0] & cin)};

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    for (genvar i = 0; i < W; i++) begin : g_node
      if (i >= (1 << k)) begin : g_black
        assign gen[k+1][i]  = gen[k][i] | (prop[k][i] & gen[k][i-(1<<k)]);
        assign prop[k+1][i] = prop[k][i] & prop[k][i-(1<<k)];
      end else begin : g_pass
        assign gen[k+1][i]  = gen[k][i];
        assign prop[k+1][i] = prop[k][i];
      end
    end
  end

  always_comb begin
    sum[0] = pg_p[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = pg_p[i] ^ gen[STAGES][i-1];
    cout = gen[STAGES][W-1];
  end
endmodule
