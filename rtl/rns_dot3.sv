// Reversible RNS dot-product unit: y = |a0*b0 + a1*b1 + a2*b2|_M over the moduli
// set {2^N-1, 2^(N+K), 2^N+1}, M = (2^N-1) * 2^(N+K) * (2^N+1).
//
// Every component is built from reversible gates (Feynman, Peres, HNG, Fredkin,
// Toffoli and the RAM copy gate). The datapath has the three RNS stages:
//   1. six forward converters (rev_fwd_conv) turn the (3N+K)-bit operands into
//      residues; they work in parallel;
//   2. per channel, three modular multipliers form the residue products, and one
//      modular carry-save adder followed by a modular adder sums them:
//        2^N-1    : rev_mul_mod2nm1, rev_csa with end-around carry, rev_add_mod2nm1
//        2^(N+K)  : rev_mul_mod2n,   rev_csa_lc (low constant count), rev_rca_mod2n
//        2^N+1    : rev_mul_mod2np1, rev_sum_mod2np1 (carry-save adders with
//                   complemented end-around carry and the final modulo 2^N+1 adder);
//                   the N+1-bit products p = pl + ph*2^N enter as the rows pl0, pl1,
//                   pl2 and ~(ph0 + ph1 + ph2), the count of high bits formed by
//                   one HNG gate;
//   3. the reverse converter (rev_rev_conv) turns the three residue sums back into
//      the (3N+K)-bit binary result.
// The result is exact when the true dot product is below M (operands of q bits with
// 2q + 2 <= 3N + K), otherwise it is the dot product modulo M. The residue sums
// r1, r2, r3 are brought out as well.
// Three terms, as in the dot-product case study of the design (three products summed
// by one carry-save adder and one adder per channel). Purely combinational: a new
// result is valid one propagation delay after the operands change.
module rns_dot3 #(
  parameter int unsigned N = rev_rns_pkg::DEF_N,
  parameter int unsigned K = rev_rns_pkg::DEF_K
) (
  input  logic [2:0][3*N+K-1:0] a,
  input  logic [2:0][3*N+K-1:0] b,
  output logic [N-1:0]          r1,
  output logic [N+K-1:0]        r2,
  output logic [N:0]            r3,
  output logic [3*N+K-1:0]      y
);

  if (K > N || N < 3) begin : g_bad_param
    $error("rns_dot3 needs 0 <= K <= N and N >= 3");
  end

  logic [2:0][N-1:0]   a1, b1, p1;
  logic [2:0][N+K-1:0] a2, b2, p2;
  logic [2:0][N:0]     a3, b3, p3;

  for (genvar t = 0; t < 3; t++) begin : g_term
    rev_fwd_conv #(.N(N), .K(K)) u_fa (.x(a[t]), .x1(a1[t]), .x2(a2[t]), .x3(a3[t]));
    rev_fwd_conv #(.N(N), .K(K)) u_fb (.x(b[t]), .x1(b1[t]), .x2(b2[t]), .x3(b3[t]));
    rev_mul_mod2nm1 #(.N(N))     u_m1 (.x(a1[t]), .y(b1[t]), .p(p1[t]));
    rev_mul_mod2n   #(.N(N + K)) u_m2 (.x(a2[t]), .y(b2[t]), .p(p2[t]));
    rev_mul_mod2np1 #(.N(N))     u_m3 (.x(a3[t]), .y(b3[t]), .p(p3[t]));
  end

  // 2^N-1 channel
  logic [N-1:0] s1, c1;
  logic         co1_unused;
  rev_csa #(.N(N), .EAC(1'b1)) u_csa1 (.a(p1[0]), .b(p1[1]), .c(p1[2]),
                                       .s(s1), .cv(c1), .cout(co1_unused));
  rev_add_mod2nm1 #(.N(N), .SINGLE_ZERO(1'b1)) u_add1 (.a(s1), .b(c1), .y(r1));

  // 2^(N+K) channel
  logic [N+K-1:0] s2, c2;
  rev_csa_lc #(.N(N + K)) u_csa2 (.a(p2[0]), .b(p2[1]), .c(p2[2]), .s(s2), .cv(c2));
  rev_rca_mod2n #(.N(N + K)) u_add2 (.a(s2), .b(c2), .cin(1'b0), .y(r2));

  // 2^N+1 channel
  logic         hcnt0, hcnt1, ha_unused, hb_unused, n0, n1, f0_unused, f1_unused;
  logic [N-1:0] nh;
  rev_hng u_cnt (.a(p3[0][N]), .b(p3[1][N]), .c(p3[2][N]), .d(1'b0),
                 .p(ha_unused), .q(hb_unused), .r(hcnt0), .s(hcnt1));
  rev_fg u_n0 (.a(hcnt0), .b(1'b1), .p(f0_unused), .q(n0));
  rev_fg u_n1 (.a(hcnt1), .b(1'b1), .p(f1_unused), .q(n1));
  assign nh = {{(N-2){1'b1}}, n1, n0};
  rev_sum_mod2np1 #(.N(N), .ROWS(4), .BIAS(-64'sd2)) u_sum3 (
    .rows({nh, p3[2][N-1:0], p3[1][N-1:0], p3[0][N-1:0]}), .y(r3));

  // back to binary
  rev_rev_conv #(.N(N), .K(K)) u_rc (.x1(r1), .x2(r2), .x3(r3), .x(y));

endmodule
