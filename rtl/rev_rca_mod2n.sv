// Reversible modulo 2^N ripple-carry adder.
//
// A chain of N HNG full adders: bit i adds a[i], b[i] and the carry from bit i-1
// (cin at bit 0); the carry out of the top bit is discarded, giving
//   y = (a + b + cin) mod 2^N.
// Each HNG has one constant-0 input. This is the adder of the 2^(n+k) channel.
// Combinational; the carry ripples through N gates.
module rev_rca_mod2n #(
  parameter int unsigned N = rev_rns_pkg::DEF_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] y
);

  logic [N:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    logic pa_unused, pb_unused;
    rev_hng u_hng (.a(a[i]), .b(b[i]), .c(c[i]), .d(1'b0),
                   .p(pa_unused), .q(pb_unused), .r(y[i]), .s(c[i+1]));
  end

  logic top_carry_unused;
  assign top_carry_unused = c[N];

endmodule
