// Reversible modulo 2^N multiplier.
//
// Only the N low bits of x*y are kept, so only the partial-product bits
// x[i] & y[j] with i + j < N are formed (N(N+1)/2 Peres AND gates; y[j] is copied
// N-j times by a rev_ram copy gate, x[i] passes along its row through the Peres
// gates). The triangle is summed as an array: row i (bits i .. N-1) is added to the
// running sum with a Peres half adder at bit i and HNG full adders above it, the
// carry out of bit N-1 being dropped. That is N-1 Peres gates and (N-2)(N-1)/2 HNG
// gates, and the longest path is N-2 HNGs followed by a Peres gate.
//   p = (x * y) mod 2^N
// Needs N >= 2. Combinational, no timing.
module rev_mul_mod2n #(
  parameter int unsigned N = rev_rns_pkg::DEF_N
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);

  logic [N-1:0][N-1:0] ycp;    // ycp[j][i]: copy of y[j] for row i (i < N-j used)
  logic [N-1:0][N:0]   xch;    // x[i] after its row's Peres gates
  logic [N-1:0][N-1:0] pp;     // pp[i][b]: x[i] & y[b-i] for b >= i
  logic [N-1:0][N-1:0] acc;    // acc[i]: running sum after row i (bits >= i valid)

  for (genvar j = 0; j < N; j++) begin : g_fan
    if (N - j > 1) begin : g_ram
      rev_ram #(.N(N - j)) u_ram (.in({{(N-j-1){1'b0}}, y[j]}), .out(ycp[j][N-j-1:0]));
    end else begin : g_wire
      assign ycp[j][0] = y[j];
    end
    if (j > 0) begin : g_pad
      assign ycp[j][N-1:N-j] = '0;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    assign xch[i][0] = x[i];
    for (genvar b = 0; b < N; b++) begin : g_bit
      if (b >= i) begin : g_and
        logic q_unused;
        rev_pg u_and (.a(xch[i][b-i]), .b(ycp[b-i][i]), .c(1'b0),
                      .p(xch[i][b-i+1]), .q(q_unused), .r(pp[i][b]));
      end else begin : g_zero
        assign pp[i][b] = 1'b0;
      end
    end
    for (genvar k = N - i + 1; k <= N; k++) begin : g_xfill
      assign xch[i][k] = 1'b0;
    end
  end

  // array summation
  assign acc[0] = pp[0];
  for (genvar i = 1; i < N; i++) begin : g_add
    logic [N:0] c;
    for (genvar b = 0; b < i; b++) begin : g_keep
      assign acc[i][b] = acc[i-1][b];
    end
    logic hp_unused;
    rev_pg u_ha (.a(acc[i-1][i]), .b(pp[i][i]), .c(1'b0),
                 .p(hp_unused), .q(acc[i][i]), .r(c[i+1]));
    for (genvar b = i + 1; b < N; b++) begin : g_fa
      logic pa_unused, pb_unused;
      rev_hng u_fa (.a(acc[i-1][b]), .b(pp[i][b]), .c(c[b]), .d(1'b0),
                    .p(pa_unused), .q(pb_unused), .r(acc[i][b]), .s(c[b+1]));
    end
    for (genvar b = 0; b <= i; b++) begin : g_cfill
      assign c[b] = 1'b0;
    end
  end

  assign p = acc[N-1];

endmodule
