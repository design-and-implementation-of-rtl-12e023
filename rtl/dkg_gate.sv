// dkg_gate: the 4-input, 4-output reversible DKG gate.
//
// Function (one-to-one mapping of {A,B,C,D} onto {P,Q,R,S}):
//   P = B
//   Q = ~A & C | A & ~D
//   R = (A ^ B) & (C ^ D) ^ (C & D)
//   S = B ^ C ^ D
// With A = 0 the gate is a full adder of B, C, D: R is the carry, S the sum,
// and P, Q (copies of B and C) are garbage outputs. With A = 1 it is a full
// subtractor: S is the difference and R the borrow of B - C - D. These
// equations are the published definition of the gate; nothing here is a
// design choice.
// P is a plain copy of B by the gate's definition; it and Q exist so that
// the gate has as many outputs as inputs. Purely combinational, no timing.
module dkg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = b;
    q = (~a & c) | (a & ~d);
    r = ((a ^ b) & (c ^ d)) ^ (c & d);
    s = b ^ c ^ d;
  end
endmodule
