// HNG gate, a 4x4 reversible gate.
//   p = a, q = b, r = a ^ b ^ c, s = ((a ^ b) & c) ^ (a & b) ^ d
// With d = 0 it is a full adder: r is the sum and s the carry (majority) of a, b
// and c. Every full adder in the carry-save and ripple-carry adders of this design
// is one HNG gate. Combinational, no timing.
module rev_hng (
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
    p = a;
    q = b;
    r = a ^ b ^ c;
    s = ((a ^ b) & c) ^ (a & b) ^ d;
  end
endmodule
