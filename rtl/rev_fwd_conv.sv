// Reversible forward converter for the moduli set {2^N-1, 2^(N+K), 2^N+1}.
//
// The (3N+K)-bit binary input X is cut into N-bit digits A = X[N-1:0],
// B = X[2N-1:N], C = X[3N-1:2N] and a K-bit top digit D = X[3N+K-1:3N].
//   x2 = |X|_(2^(N+K)) = X[N+K-1:0]                            (wiring only)
//   x1 = |A + B + C + D|_(2^N-1)  since 2^N == 1:  two carry-save adders with
//        end-around carry and the double-zero modulo 2^N-1 adder. x1 = 2^N-1 is
//        the second code for zero.
//   x3 = |A - B + C - D|_(2^N+1)  since 2^N == -1:  B and D are inverted by Feynman
//        gates (~v == -v - 2), and the rows A, ~B, C, ~D go through rev_sum_mod2np1:
//        three carry-save adders with complemented end-around carry (one of them
//        taking the constant row) and the modulo 2^N+1 adder. x3 is 0 .. 2^N in
//        ordinary N+1-bit form.
// The double-zero adder on the 2^N-1 channel follows the published choice (it
// needs no all-ones detection). Valid for 0 <= K <= N. Combinational, no timing.
module rev_fwd_conv #(
  parameter int unsigned N = rev_rns_pkg::DEF_N,
  parameter int unsigned K = rev_rns_pkg::DEF_K
) (
  input  logic [3*N+K-1:0] x,
  output logic [N-1:0]     x1,
  output logic [N+K-1:0]   x2,
  output logic [N:0]       x3
);

  if (K > N || N < 2) begin : g_bad_param
    $error("rev_fwd_conv needs 0 <= K <= N and N >= 2");
  end

  logic [4*N-1:0] xp;
  logic [N-1:0]   da, db, dc, dd;
  assign xp = {{(N - K){1'b0}}, x};
  assign da = xp[N-1:0];
  assign db = xp[2*N-1:N];
  assign dc = xp[3*N-1:2*N];
  assign dd = xp[4*N-1:3*N];

  // modulo 2^(N+K) channel
  assign x2 = x[N+K-1:0];

  // modulo 2^N-1 channel
  logic [N-1:0] s1, c1, s2, c2;
  logic         co1_unused, co2_unused;
  rev_csa #(.N(N), .EAC(1'b1)) u_csa1 (.a(da), .b(db), .c(dc), .s(s1), .cv(c1), .cout(co1_unused));
  rev_csa #(.N(N), .EAC(1'b1)) u_csa2 (.a(s1), .b(c1), .c(dd), .s(s2), .cv(c2), .cout(co2_unused));
  rev_add_mod2nm1 #(.N(N), .SINGLE_ZERO(1'b0)) u_add1 (.a(s2), .b(c2), .y(x1));

  // modulo 2^N+1 channel
  logic [N-1:0] nb, nd;
  for (genvar i = 0; i < N; i++) begin : g_not
    logic pb_unused, pd_unused;
    rev_fg u_nb (.a(db[i]), .b(1'b1), .p(pb_unused), .q(nb[i]));
    rev_fg u_nd (.a(dd[i]), .b(1'b1), .p(pd_unused), .q(nd[i]));
  end
  rev_sum_mod2np1 #(.N(N), .ROWS(4), .BIAS(-64'sd4)) u_sum3 (.rows({nd, dc, nb, da}), .y(x3));

endmodule
