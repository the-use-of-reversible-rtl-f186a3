// Reversible carry-save adder, with or without end-around carry.
//
// One HNG full adder per bit compresses three N-bit operands a, b, c into a sum
// vector s and a carry vector cv, both N bits. The carry of bit i is placed at bit
// i+1 of cv. What happens to the carry of the top bit is set by EAC:
//   EAC = 0: it is dropped (cv[0] = 0):      a + b + c == s + cv   (mod 2^N)
//   EAC = 1: it wraps round to cv[0]:        a + b + c == s + cv   (mod 2^N - 1)
// The end-around form is the multi-operand building block of the modulo 2^n-1
// channel and of the reverse converter. The top carry is also given out as cout.
// Each HNG has one constant-0 input. Combinational, no timing.
module rev_csa #(
  parameter int unsigned N   = rev_rns_pkg::DEF_N,
  parameter bit          EAC = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cv,
  output logic         cout
);

  logic [N-1:0] carry;

  for (genvar i = 0; i < N; i++) begin : g_fa
    logic pa_unused, pb_unused;
    rev_hng u_hng (.a(a[i]), .b(b[i]), .c(c[i]), .d(1'b0),
                   .p(pa_unused), .q(pb_unused), .r(s[i]), .s(carry[i]));
  end

  always_comb begin
    cv = {carry[N-2:0], (EAC ? carry[N-1] : 1'b0)};
    cout = carry[N-1];
  end

endmodule
