// Reversible modulo 2^N+1 multiplier.
//
// Operands and product are residues in ordinary N+1-bit form, 0 .. 2^N. Write
// x = xl + xh*2^N with xl = x[N-1:0], xh = x[N] (xh = 1 only for x = 2^N, and then
// xl = 0), the same for y. Modulo 2^N+1, 2^N == -1 and 2^(2N) == 1, so
//   x*y == xl*yl - xh*yl - yh*xl + xh*yh.
// Partial-product unit (Peres gates as AND gates, Feynman gates with a constant-1
// input as NOT gates, rev_ram copy gates for y):
//   row i < N: bit b >= i holds x[i] & y[b-i]; the bits that would land at weight
//              2^(b+N) wrap round to bit b < i inverted, since -v*2^b == ~v*2^b - 2^b;
//   row N:     ~(xh & yl), standing for -xh*yl;
//   row N+1:   ~(yh & xl), standing for -yh*xl;
//   xh & yh is XORed into bit 0 of row 0 by a Toffoli gate (row 0 is all zero
//   whenever xh = yh = 1).
// The rows add up to x*y + 2^N - N - 5; rev_sum_mod2np1 removes that constant while
// summing them with N+1 levels of carry-save adders with complemented end-around
// carry and the final modulo 2^N+1 adder.
//   p = |x * y|_(2^N+1)
// This sign-and-wrap arrangement of the partial products is this design's own; the
// division into partial-product unit, CEAC carry-save rows and final adder follows
// the published structure. Needs N >= 2. Combinational, no timing.
module rev_mul_mod2np1 #(
  parameter int unsigned N = rev_rns_pkg::DEF_N
) (
  input  logic [N:0] x,
  input  logic [N:0] y,
  output logic [N:0] p
);

  localparam longint BIAS = (longint'(1) << N) - longint'(N) - 5;

  logic [N-1:0][N:0]   ycp;    // ycp[j][i]: copy of y[j]; i < N for row i, i = N for row N
  logic [N-1:0][N+1:0] xch;    // x[i] along its row, then through row N+1
  logic [N:0]          xhch;   // x[N] along row N
  logic [N:0]          yhch;   // y[N] along row N+1
  logic [N+1:0][N-1:0] rows;
  logic                raw0;   // bit 0 of row 0 before the xh & yh correction

  for (genvar j = 0; j < N; j++) begin : g_fan
    rev_ram #(.N(N + 1)) u_ram (.in({{N{1'b0}}, y[j]}), .out(ycp[j]));
  end

  // rows 0 .. N-1
  for (genvar i = 0; i < N; i++) begin : g_row
    assign xch[i][0] = x[i];
    for (genvar b = 0; b < N; b++) begin : g_bit
      localparam int J = (b >= i) ? b - i : N - i + b;
      logic q_unused, prod;
      rev_pg u_and (.a(xch[i][b]), .b(ycp[J][i]), .c(1'b0),
                    .p(xch[i][b+1]), .q(q_unused), .r(prod));
      if (b >= i) begin : g_pos
        if (i == 0 && b == 0) begin : g_raw
          assign raw0 = prod;
        end else begin : g_plain
          assign rows[i][b] = prod;
        end
      end else begin : g_neg
        logic np_unused;
        rev_fg u_not (.a(prod), .b(1'b1), .p(np_unused), .q(rows[i][b]));
      end
    end
  end

  // row N: ~(xh & yl)
  assign xhch[0] = x[N];
  for (genvar b = 0; b < N; b++) begin : g_rown
    logic q_unused, prod, np_unused;
    rev_pg u_and (.a(xhch[b]), .b(ycp[b][N]), .c(1'b0),
                  .p(xhch[b+1]), .q(q_unused), .r(prod));
    rev_fg u_not (.a(prod), .b(1'b1), .p(np_unused), .q(rows[N][b]));
  end

  // row N+1: ~(yh & xl)
  assign yhch[0] = y[N];
  for (genvar b = 0; b < N; b++) begin : g_rown1
    logic q_unused, prod, np_unused;
    rev_pg u_and (.a(yhch[b]), .b(xch[b][N]), .c(1'b0),
                  .p(yhch[b+1]), .q(q_unused), .r(prod));
    rev_fg u_not (.a(prod), .b(1'b1), .p(np_unused), .q(rows[N+1][b]));
    assign xch[b][N+1] = 1'b0;
  end

  // xh & yh into bit 0 of row 0
  logic ta_unused, tb_unused;
  rev_tg u_hh (.a(xhch[N]), .b(yhch[N]), .c(raw0),
               .p(ta_unused), .q(tb_unused), .r(rows[0][0]));

  rev_sum_mod2np1 #(.N(N), .ROWS(N + 2), .BIAS(BIAS)) u_sum (.rows(rows), .y(p));

endmodule
