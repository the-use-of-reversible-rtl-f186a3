// Fredkin gate (controlled swap), a 3x3 reversible gate.
//   p = a, q = (~a & b) ^ (a & c), r = (~a & c) ^ (a & b)
// When a is 1, b and c trade places. With c tied to 1, q = a | b, which is how the
// modulo 2^n-1 adder merges the carry out with the all-ones detection. Combinational.
module rev_frg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end
endmodule
