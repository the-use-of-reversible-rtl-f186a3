// Peres gate, a 3x3 reversible gate.
//   p = a, q = a ^ b, r = (a & b) ^ c
// With c = 0 it is a half adder (q = sum, r = carry) and an AND gate (r = a & b)
// whose p output passes a on unchanged, so a row of Peres gates can chain one
// operand bit through many AND operations. Combinational, no timing.
module rev_pg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
