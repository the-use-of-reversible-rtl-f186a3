// Workload testbench: ten-term dot products y = sum A_i * B_i of q-bit operands on
// rns_dot3, for every operand width q = 3 .. 15 of the case study, each with the
// moduli parameter n listed for it (k = 0). rns_dot3 sums three products per pass;
// the ten terms take five passes: terms 0-2, then (previous result * 1) plus two
// new terms, three times, then the last term. The result must equal the exact dot
// product, computed here with 64-bit integers, and must lie inside the dynamic
// range. The first trial of each width uses all-ones operands (the largest dot
// product). Watchdog included.
module tb_rns_workload_dot;
  localparam int ROWS = 13;
  localparam int QS [ROWS] = '{3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15};
  localparam int NS [ROWS] = '{4, 5, 5, 6, 7, 7, 8, 9, 9, 10, 11, 11, 12};
  localparam int TERMS = 10;
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
      longint m, dot, acc;
      longint av [TERMS], bv [TERMS];
      m = ((longint'(1) << N) - 1) * (longint'(1) << N) * ((longint'(1) << N) + 1);
      for (int t = 0; t < TRIALS; t++) begin
        dot = 0;
        for (int i = 0; i < TERMS; i++) begin
          av[i] = (t == 0) ? (longint'(1) << QS[r]) - 1 : longint'($urandom) & ((longint'(1) << QS[r]) - 1);
          bv[i] = (t == 0) ? (longint'(1) << QS[r]) - 1 : longint'($urandom) & ((longint'(1) << QS[r]) - 1);
          dot += av[i] * bv[i];
        end
        // pass 1: terms 0..2
        for (int j = 0; j < 3; j++) begin a[j] = W'(av[j]); b[j] = W'(bv[j]); end
        #1;
        acc = longint'(y);
        // passes 2..5: previous result plus up to two new terms
        for (int i = 3; i < TERMS; i += 2) begin
          a[0] = W'(acc);  b[0] = W'(1);
          a[1] = W'(av[i]); b[1] = W'(bv[i]);
          if (i + 1 < TERMS) begin a[2] = W'(av[i+1]); b[2] = W'(bv[i+1]); end
          else begin a[2] = '0; b[2] = '0; end
          #1;
          acc = longint'(y);
        end
        checks++;
        if (acc != dot || dot >= m) begin
          failures++;
          $display("FAIL q=%0d n=%0d got %0d expected %0d", QS[r], N, acc, dot);
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
