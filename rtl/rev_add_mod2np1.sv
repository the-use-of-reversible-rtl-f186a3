// Reversible modulo 2^N+1 adder (diminished-one style final adder).
//
// An N-bit ripple chain of HNG full adders adds a, b and the carry input cin; its
// carry out co is inverted by a Feynman gate with a constant-1 input, and a chain of
// N Peres half adders adds ~co back at bit 0. The carry out of that chain is the
// output bit yz. Together
//   {yz, y} = |a + b + cin + 1|_(2^N+1),   a value in 0 .. 2^N.
// For operands in diminished-one code (a = x-1, b = y-1, cin = 0), y is the
// diminished-one code of x+y and yz = 1 flags a zero sum. The multipliers and
// converters of this design keep their modulo 2^N+1 residues in ordinary N+1-bit
// form and use {yz, y} directly as that form.
// Combinational; the carry ripples through 2N gates.
module rev_add_mod2np1 #(
  parameter int unsigned N = rev_rns_pkg::DEF_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] y,
  output logic         yz
);

  logic [N-1:0] z;
  logic [N:0]   rc, ic;
  logic         nco, fg_p_unused;

  assign rc[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_rca
    logic pa_unused, pb_unused;
    rev_hng u_hng (.a(a[i]), .b(b[i]), .c(rc[i]), .d(1'b0),
                   .p(pa_unused), .q(pb_unused), .r(z[i]), .s(rc[i+1]));
  end

  rev_fg u_not (.a(rc[N]), .b(1'b1), .p(fg_p_unused), .q(nco));

  assign ic[0] = nco;
  for (genvar i = 0; i < N; i++) begin : g_inc
    logic pp_unused;
    rev_pg u_ha (.a(z[i]), .b(ic[i]), .c(1'b0), .p(pp_unused), .q(y[i]), .r(ic[i+1]));
  end

  assign yz = ic[N];

endmodule
