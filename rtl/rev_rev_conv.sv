// Reversible reverse converter for the moduli set {2^N-1, 2^(N+K), 2^N+1}.
//
// The binary number is X = x2 + 2^(N+K) * Y, so x2 forms the low N+K bits and only
// Y = floor(X / 2^(N+K)), a 2N-bit number, is computed. With the Chinese remainder
// theorem for the pair 2^N-1, 2^N+1 (whose product is 2^(2N)-1),
//   Y = | 2^-(N+K) * ( x1*(2^N+1)*2^(N-1) + x3*(2^N-1)*2^(N-1) - x2 ) |_(2^(2N)-1).
// Modulo 2^(2N)-1 a product with 2^e is a rotation of the 2N-bit word and a negation
// is a bit inversion, so Y is the modular sum of four 2N-bit operands that are only
// rewired (and partly inverted) residue bits:
//   U1 = rotl({x1, x1}, e1)              x1*(2^N+1)
//   U2 = rotl({x3l | x3h, ~x3l}, e1)     x3*(2^N-1) apart from the constant below
//   U3 = rotl(~{0, x2}, e3)              -x2
//   U4 = rotl({1...1, 0...0}, e1)        constant completing U2
// with e1 = (N-1) - (N+K) and e3 = -(N+K), both taken modulo 2N, x3l = x3[N-1:0]
// and x3h = x3[N] repeated N times. Two 2N-bit carry-save adders with end-around
// carry and a 2N-bit modulo 2^(2N)-1 adder with a single zero (Toffoli all-ones
// tree, Fredkin OR, Peres incrementer) give Y, and X = {Y, x2}.
// The operand formulas are worked out here from the CRT; the adder structure is the
// published one. x1 may use either zero code; x3 is in ordinary N+1-bit form.
// Valid for 0 <= K <= N. Combinational, no timing.
module rev_rev_conv #(
  parameter int unsigned N = rev_rns_pkg::DEF_N,
  parameter int unsigned K = rev_rns_pkg::DEF_K
) (
  input  logic [N-1:0]     x1,
  input  logic [N+K-1:0]   x2,
  input  logic [N:0]       x3,
  output logic [3*N+K-1:0] x
);

  localparam int unsigned W  = 2 * N;
  localparam int unsigned E1 = (2 * N - 1 - K) % W;
  localparam int unsigned E3 = (N - K) % W;

  function automatic logic [W-1:0] rotl(logic [W-1:0] v, int unsigned e);
    return (e == 0) ? v : ((v << e) | (v >> (W - e)));
  endfunction

  if (K > N || N < 2) begin : g_bad_param
    $error("rev_rev_conv needs 0 <= K <= N and N >= 2");
  end

  logic [N-1:0] x3l, x3h, nx3l;
  logic [W-1:0] nx2;
  logic [W-1:0] u1, u2, u3, u4;

  assign x3l = x3[N-1:0];
  assign x3h = x3l | {N{x3[N]}};

  for (genvar i = 0; i < N; i++) begin : g_n3
    logic p_unused;
    rev_fg u_not (.a(x3l[i]), .b(1'b1), .p(p_unused), .q(nx3l[i]));
  end
  for (genvar i = 0; i < W; i++) begin : g_n2
    logic p_unused;
    if (i < N + K) begin : g_bit
      rev_fg u_not (.a(x2[i]), .b(1'b1), .p(p_unused), .q(nx2[i]));
    end else begin : g_pad
      assign p_unused = 1'b0;
      assign nx2[i]   = 1'b1;
    end
  end

  always_comb begin
    u1 = rotl({x1, x1}, E1);
    u2 = rotl({x3h, nx3l}, E1);
    u3 = rotl(nx2, E3);
    u4 = rotl({{N{1'b1}}, {N{1'b0}}}, E1);
  end

  logic [W-1:0] s1, c1, s2, c2, yv;
  logic         co1_unused, co2_unused;
  rev_csa #(.N(W), .EAC(1'b1)) u_csa1 (.a(u1), .b(u2), .c(u3), .s(s1), .cv(c1), .cout(co1_unused));
  rev_csa #(.N(W), .EAC(1'b1)) u_csa2 (.a(s1), .b(c1), .c(u4), .s(s2), .cv(c2), .cout(co2_unused));
  rev_add_mod2nm1 #(.N(W), .SINGLE_ZERO(1'b1)) u_add (.a(s2), .b(c2), .y(yv));

  assign x = {yv, x2};

endmodule
