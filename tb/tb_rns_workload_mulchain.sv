// Workload testbench: consecutive multiplications of 4-bit operands on rns_dot3.
// For every row of the case study (2 to 12 operands of 4 bits, moduli parameter n
// chosen so that the 3n-bit dynamic range holds the 4c-bit product, k = 0), one
// rns_dot3 instance of that n multiplies a chain of random 4-bit operands: each
// pass computes P * op (the two other terms set to 0) and the binary result is fed
// to the next pass. The final value must equal the exact product, computed here
// with 64-bit integers and lie inside the dynamic range. The first trial of every
// row multiplies only 15s, the largest product the row must hold. Watchdog included.
module tb_rns_workload_mulchain;
  localparam int ROWS = 11;
  localparam int OPS [ROWS] = '{2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12};
  localparam int NS  [ROWS] = '{3, 4, 6, 7, 8, 10, 11, 12, 14, 15, 16};
  localparam int TRIALS = 30;

  int checks = 0, failures = 0, rows_done = 0;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    localparam int N = NS[r];
    localparam int W = 3 * N;
    logic [2:0][W-1:0] a, b;
    logic [N-1:0]      r1;
    logic [N-1:0]      r2;
    logic [N:0]        r3;
    logic [W-1:0]      y;

    rns_dot3 #(.N(N), .K(0)) u_dut (.a(a), .b(b), .r1(r1), .r2(r2), .r3(r3), .y(y));

    initial begin
      longint m, prod, p;
      m = ((longint'(1) << N) - 1) * (longint'(1) << N) * ((longint'(1) << N) + 1);
      for (int t = 0; t < TRIALS; t++) begin
        longint op;
        op = longint'($urandom_range(15, (t == 0) ? 15 : 1));
        prod = op;
        p = op;
        for (int i = 1; i < OPS[r]; i++) begin
          op = longint'($urandom_range(15, (t == 0) ? 15 : 1));
          prod = prod * op;
          a = '0; b = '0;
          a[0] = W'(p);
          b[0] = W'(op);
          #1;
          p = longint'(y);
        end
        checks++;
        if (p != prod % m || prod >= m) begin
          failures++;
          $display("FAIL n=%0d ops=%0d got %0d expected %0d", N, OPS[r], p, prod);
        end
      end
      rows_done++;
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (rows_done == ROWS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
