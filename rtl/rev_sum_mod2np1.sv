// Multi-operand modulo 2^N+1 adder: a chain of carry-save adders with complemented
// end-around carry followed by the modulo 2^N+1 final adder.
//
// The caller hands in ROWS rows of N bits whose sum is congruent to the wanted
// result plus a known constant BIAS (rows that stand for negative terms arrive
// complemented, and each complement is off by a fixed amount). This module appends
// one constant row C, reduces the ROWS+1 rows to two with ROWS-1 levels of
// rev_csa_ceac (each level adds +1 modulo 2^N+1), and finishes with rev_add_mod2np1
// (which adds +1 more). C is chosen at elaboration so that everything cancels:
//   y = |sum(rows) - BIAS|_(2^N+1),   N+1 bits, 0 .. 2^N
// When that constant comes out as 2^N, C = 2^N-1 and the final carry input is 1.
// Level l adds row l+2 to the sum and carry vectors of level l-1, the linear array
// used by the multipliers and the forward converter. Needs ROWS >= 2.
// Combinational, no timing.
module rev_sum_mod2np1 #(
  parameter int unsigned N    = rev_rns_pkg::DEF_N,
  parameter int unsigned ROWS = 4,
  parameter longint      BIAS = 0
) (
  input  logic [ROWS-1:0][N-1:0] rows,
  output logic [N:0]             y
);
  import rev_rns_pkg::*;

  localparam int unsigned LEVELS = ROWS - 1;
  localparam logic [N-1:0] CROW  = N'(ceac_const(N, ROWS, BIAS));
  localparam bit           CIN   = ceac_const_cin(N, ROWS, BIAS);

  logic [ROWS:0][N-1:0]     all_rows;
  logic [LEVELS-1:0][N-1:0] s, cv;

  assign all_rows = {CROW, rows};

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    if (l == 0) begin : g_first
      rev_csa_ceac #(.N(N)) u_csa (.a(all_rows[0]), .b(all_rows[1]), .c(all_rows[2]),
                                   .s(s[0]), .cv(cv[0]));
    end else begin : g_next
      rev_csa_ceac #(.N(N)) u_csa (.a(s[l-1]), .b(cv[l-1]), .c(all_rows[l+2]),
                                   .s(s[l]), .cv(cv[l]));
    end
  end

  rev_add_mod2np1 #(.N(N)) u_add (.a(s[LEVELS-1]), .b(cv[LEVELS-1]), .cin(CIN),
                                  .y(y[N-1:0]), .yz(y[N]));

endmodule
