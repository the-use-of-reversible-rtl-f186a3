// Toffoli gate (controlled-controlled NOT), a 3x3 reversible gate.
//   p = a, q = b, r = (a & b) ^ c
// With c = 0 it is a two-input AND that also passes both inputs on; trees of Toffoli
// gates detect an all-ones sum in the modulo 2^n-1 adder. Combinational.
module rev_tg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end
endmodule
