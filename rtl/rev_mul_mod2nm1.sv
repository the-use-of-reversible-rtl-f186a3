// Reversible modulo 2^N-1 multiplier.
//
// Since 2^N == 1 modulo 2^N-1, the partial product of multiplier bit x[i] is
// y rotated left by i places, ANDed with x[i]:
//   |x * y|_(2^N-1) = | sum_i x[i] * rotl(y, i) |_(2^N-1)
// Partial-product unit: each y[j] is copied N times by a rev_ram copy gate, and
// row i is N Peres gates used as AND gates; x[i] enters the first Peres gate of its
// row and is handed on through the gates' pass-through output, so it needs no copy
// gate. Summation: the N rows go through N-2 levels of carry-save adders with
// end-around carry (rev_csa, EAC = 1), level l adding row l+2, and a modulo 2^N-1
// adder with a single zero (rev_add_mod2nm1) gives the product.
// Operands are N-bit residues below 2^N-1; the result lies in 0 .. 2^N-2, except
// that it can come out as the second zero code 2^N-1 when both final adder inputs
// are all ones. Needs N >= 3. Combinational, no timing.
module rev_mul_mod2nm1 #(
  parameter int unsigned N = rev_rns_pkg::DEF_N
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);

  if (N < 3) begin : g_bad_param
    $error("rev_mul_mod2nm1 needs N >= 3");
  end

  logic [N-1:0][N-1:0] ycp;    // ycp[j][i]: copy of y[j] for row i
  logic [N-1:0][N:0]   xch;    // xch[i][k]: x[i] after k Peres gates of row i
  logic [N-1:0][N-1:0] pp;     // pp[i]: partial product row i

  // partial-product generation
  for (genvar j = 0; j < N; j++) begin : g_fan
    rev_ram #(.N(N)) u_ram (.in({{(N-1){1'b0}}, y[j]}), .out(ycp[j]));
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    assign xch[i][0] = x[i];
    for (genvar b = 0; b < N; b++) begin : g_and
      logic q_unused;
      rev_pg u_and (.a(xch[i][b]), .b(ycp[(b - i + N) % N][i]), .c(1'b0),
                    .p(xch[i][b+1]), .q(q_unused), .r(pp[i][b]));
    end
  end

  // carry-save summation with end-around carry
  logic [N-3:0][N-1:0] s, cv;
  logic [N-3:0]        co_unused;
  for (genvar l = 0; l < N - 2; l++) begin : g_csa
    if (l == 0) begin : g_first
      rev_csa #(.N(N), .EAC(1'b1)) u_csa (.a(pp[0]), .b(pp[1]), .c(pp[2]),
                                          .s(s[0]), .cv(cv[0]), .cout(co_unused[0]));
    end else begin : g_next
      rev_csa #(.N(N), .EAC(1'b1)) u_csa (.a(s[l-1]), .b(cv[l-1]), .c(pp[l+2]),
                                          .s(s[l]), .cv(cv[l]), .cout(co_unused[l]));
    end
  end

  rev_add_mod2nm1 #(.N(N), .SINGLE_ZERO(1'b1)) u_add (.a(s[N-3]), .b(cv[N-3]), .y(p));

  logic [N-1:0] xpass_unused;
  for (genvar i = 0; i < N; i++) begin : g_xo
    assign xpass_unused[i] = xch[i][N];
  end

endmodule
