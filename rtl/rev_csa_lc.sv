// Reversible modulo 2^N carry-save adder with fewer constant inputs.
//
// In a modulo 2^N carry-save adder the carry of the top bit is thrown away, so the
// top bit needs only its sum a ^ b ^ c. That sum is formed in place with two Feynman
// gates (b ^= a, then c ^= b), which take no constant input; bits 0 .. N-2 keep one
// HNG full adder each. Constant inputs drop from N to N-1.
//   a + b + c == s + cv   (mod 2^N),  cv[0] = 0, cv[i] = carry of bit i-1
// The idea (full adders below, an XOR-only top bit) follows the published two-bit
// circuit; the gate-by-gate placement is this design's own.
// Needs N >= 2. Combinational, no timing.
module rev_csa_lc #(
  parameter int unsigned N = rev_rns_pkg::DEF_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cv
);

  logic [N-2:0] carry;
  logic         t_ab, p0_unused, p1_unused;

  for (genvar i = 0; i < N - 1; i++) begin : g_fa
    logic pa_unused, pb_unused;
    rev_hng u_hng (.a(a[i]), .b(b[i]), .c(c[i]), .d(1'b0),
                   .p(pa_unused), .q(pb_unused), .r(s[i]), .s(carry[i]));
  end

  rev_fg u_x0 (.a(a[N-1]), .b(b[N-1]), .p(p0_unused), .q(t_ab));
  rev_fg u_x1 (.a(t_ab),   .b(c[N-1]), .p(p1_unused), .q(s[N-1]));

  assign cv = {carry, 1'b0};

endmodule
