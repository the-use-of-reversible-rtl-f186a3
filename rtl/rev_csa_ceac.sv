// Reversible carry-save adder with complemented end-around carry (modulo 2^N+1).
//
// N HNG full adders compress a, b, c into s and cv as in rev_csa. The carry out of
// the top bit has weight 2^N, and 2^N == -1 modulo 2^N+1, so it is inverted by a
// Feynman gate with a constant-1 input and fed back to cv[0]:
//   a + b + c == s + cv - 1   (mod 2^N + 1)
// The -1 of every such level is collected by the caller into a constant row (see
// rev_sum_mod2np1). Constant inputs: N + 1. Combinational, no timing.
module rev_csa_ceac #(
  parameter int unsigned N = rev_rns_pkg::DEF_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cv
);

  logic [N-1:0] carry;
  logic         ncarry, fg_p_unused;

  for (genvar i = 0; i < N; i++) begin : g_fa
    logic pa_unused, pb_unused;
    rev_hng u_hng (.a(a[i]), .b(b[i]), .c(c[i]), .d(1'b0),
                   .p(pa_unused), .q(pb_unused), .r(s[i]), .s(carry[i]));
  end

  rev_fg u_not (.a(carry[N-1]), .b(1'b1), .p(fg_p_unused), .q(ncarry));

  assign cv = {carry[N-2:0], ncarry};

endmodule
