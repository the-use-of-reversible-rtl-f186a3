// Feynman gate (controlled NOT), the 2x2 reversible gate.
//   p = a, q = a ^ b
// With b tied to 0 it copies a (fan-out); with b tied to 1 it inverts a. Purely
// combinational, no timing. Gate function as defined for the reversible gate library
// of this design; using it as a NOT or copy element is how the larger circuits use it.
module rev_fg (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
