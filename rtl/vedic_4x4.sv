// vedic_4x4: 4x4 unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method.
//
// The product is formed in seven steps, one per output column k = 0..6. Step
// k adds the carry of step k-1 to every cross product a[i]&b[j] with
// i + j = k; the low bit of that sum is product bit k (r_k) and the rest is
// the carry c_k into step k+1:
//   r0 = a0b0,  c1r1 = a1b0+a0b1,  c2r2 = c1+a2b0+a1b1+a0b2,
//   c3r3 = c2+a3b0+a2b1+a1b2+a0b3,  c4r4 = c3+a3b1+a2b2+a1b3,
//   c5r5 = c4+a3b2+a2b3,  c6r6 = c5+a3b3,
// and the product is {c6, r6 .. r0}. All cross products are formed at once;
// only the column carries ripple. The column sums are written as plain
// additions of 1-bit terms, which is this design's choice of how to build
// each step's adder. Interface: a, b in; p out. Purely combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  always_comb begin
    logic [2:0] carry;   // c_k of the previous step
    logic [3:0] column;  // c_k r_k of the current step
    carry = '0;
    for (int k = 0; k < 7; k++) begin
      column = {1'b0, carry};
      for (int i = 0; i < 4; i++) begin
        if (k - i >= 0 && k - i < 4) column = column + 4'(a[i] & b[k-i]);
      end
      p[k]  = column[0];
      carry = column[3:1];
    end
    p[7] = carry[0];
  end
endmodule
