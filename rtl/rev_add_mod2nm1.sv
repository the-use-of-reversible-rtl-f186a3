// Reversible modulo 2^N-1 adder.
//
// Three levels of reversible gates:
//   1. an N-bit ripple-carry adder (a Peres half adder at bit 0, HNG full adders
//      above it) forms z = a + b with carry out co;
//   2. with SINGLE_ZERO = 1, a tree of Toffoli gates ANDs all bits of z to detect
//      the all-ones value 2^N-1, and a Fredkin gate with a constant-1 input ORs that
//      with co to give the end-around bit e. With SINGLE_ZERO = 0 the detection is
//      left out and e = co;
//   3. a chain of N Peres half adders adds e to the low N bits of z.
//   y = |a + b|_(2^N-1)
// SINGLE_ZERO = 1 gives one representation of zero (y is never 2^N-1 when a and b
// are below 2^N-1). SINGLE_ZERO = 0 is the cheaper double-zero adder used by the
// forward converter, where y = 2^N-1 is a second code for zero. If both inputs are
// all ones (the second zero code), y = 2^N-1 in either mode. Combinational.
module rev_add_mod2nm1 #(
  parameter int unsigned N           = rev_rns_pkg::DEF_N,
  parameter bit          SINGLE_ZERO = 1'b1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);

  logic [N-1:0] z;     // ripple-carry sum
  logic [N:0]   rc;    // ripple carries, rc[N] = carry out
  logic         eac;   // end-around bit
  logic [N:0]   ic;    // incrementer carries

  // Level 1: ripple-carry adder
  logic pg0_p_unused;
  rev_pg u_ha0 (.a(a[0]), .b(b[0]), .c(1'b0), .p(pg0_p_unused), .q(z[0]), .r(rc[1]));
  assign rc[0] = 1'b0;
  for (genvar i = 1; i < N; i++) begin : g_rca
    logic pa_unused, pb_unused;
    rev_hng u_hng (.a(a[i]), .b(b[i]), .c(rc[i]), .d(1'b0),
                   .p(pa_unused), .q(pb_unused), .r(z[i]), .s(rc[i+1]));
  end

  // Level 2: all-ones detection and OR with the carry out
  if (SINGLE_ZERO) begin : g_detect
    // complete binary tree: node j has children 2j+1 and 2j+2; leaves are
    // nodes N-1 .. 2N-2 and carry the sum bits
    logic [2*N-2:0] node;
    for (genvar j = 0; j < N; j++) begin : g_leaf
      assign node[N-1+j] = z[j];
    end
    for (genvar j = 0; j < N - 1; j++) begin : g_and
      logic ta_unused, tb_unused;
      rev_tg u_tg (.a(node[2*j+1]), .b(node[2*j+2]), .c(1'b0),
                   .p(ta_unused), .q(tb_unused), .r(node[j]));
    end
    logic fa_unused, fr_unused;
    rev_frg u_or (.a(rc[N]), .b(node[0]), .c(1'b1), .p(fa_unused), .q(eac), .r(fr_unused));
  end else begin : g_plain
    assign eac = rc[N];
  end

  // Level 3: add the end-around bit with a chain of Peres half adders
  assign ic[0] = eac;
  for (genvar i = 0; i < N; i++) begin : g_inc
    logic pp_unused;
    rev_pg u_ha (.a(z[i]), .b(ic[i]), .c(1'b0), .p(pp_unused), .q(y[i]), .r(ic[i+1]));
  end

  logic inc_carry_unused;
  assign inc_carry_unused = ic[N];

endmodule
