// End-to-end self-checking testbench for rns_dot3 at its default size (N = 4, K = 0:
// moduli 15, 16, 17, 12-bit operands and result, M = 4080).
// Three phases:
//   1. dot products of 5-bit operands, whose value (at most 2883) is below M and
//      must come out exactly;
//   2. full-width 12-bit operands, where the result must equal the dot product
//      modulo M (wrap-around of the dynamic range);
//   3. directed operands that make every residue product of the 2^N+1 channel equal
//      2^N, so that the high-bit count of that channel reaches 3.
// The residue sums r1, r2, r3 are also checked against the % operator. The
// testbench counts how often each mechanism occurred and fails any that never did:
// the second zero code out of a forward converter, the residue 2^N in the 2^N+1
// channel, the end-around carry and the all-ones correction of the 2^N-1 channel's
// adder, two or more high bits in the 2^N+1 sum, and wrap-around modulo M.
// Watchdog included.
module tb_rns_dot3;
  localparam int M = 15 * 16 * 17;
  int checks = 0, failures = 0;
  int n_dz = 0, n_top = 0, n_eac = 0, n_ones = 0, n_hcnt = 0, n_wrap = 0;
  logic [2:0][11:0] a, b;
  logic [3:0]  r1, r2;
  logic [4:0]  r3;
  logic [11:0] y;

  rns_dot3 dut (.a(a), .b(b), .r1(r1), .r2(r2), .r3(r3), .y(y));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(input string phase);
    longint dot;
    #1;
    dot = 0;
    for (int t = 0; t < 3; t++) dot += longint'(a[t]) * longint'(b[t]);
    chk(longint'(y) == dot % M, $sformatf("%s y=%0d expected %0d", phase, y, dot % M));
    chk(longint'(r1) % 15 == dot % 15, $sformatf("%s r1", phase));
    chk(longint'(r2) == dot % 16, $sformatf("%s r2", phase));
    chk(longint'(r3) == dot % 17, $sformatf("%s r3", phase));
    if (dot >= M) n_wrap++;
    for (int t = 0; t < 3; t++) begin
      if (dut.a1[t] == 4'hf || dut.b1[t] == 4'hf) n_dz++;
      if (dut.a3[t] == 5'd16 || dut.p3[t] == 5'd16) n_top++;
    end
    if (dut.u_add1.rc[4]) n_eac++;
    if (dut.u_add1.g_detect.node[0]) n_ones++;
    if (dut.hcnt1) n_hcnt++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      for (int t = 0; t < 3; t++) begin a[t] = 12'($urandom % 32); b[t] = 12'($urandom % 32); end
      apply("exact");
    end
    for (int i = 0; i < 4000; i++) begin
      for (int t = 0; t < 3; t++) begin a[t] = 12'($urandom); b[t] = 12'($urandom); end
      apply("wrap");
    end
    for (int i = 0; i < 16; i++) begin
      for (int t = 0; t < 3; t++) begin a[t] = 12'(16 + 17 * i); b[t] = 12'(1 + 17 * t); end
      apply("2^N products");
    end
    $display("second zero code %0d, residue 2^N %0d, end-around carry %0d, all-ones %0d, high-bit count>=2 %0d, wrap %0d",
             n_dz, n_top, n_eac, n_ones, n_hcnt, n_wrap);
    chk(n_dz > 0,   "second zero code never occurred");
    chk(n_top > 0,  "residue 2^N never occurred");
    chk(n_eac > 0,  "end-around carry never occurred");
    chk(n_ones > 0, "all-ones correction never occurred");
    chk(n_hcnt > 0, "high-bit count >= 2 never occurred");
    chk(n_wrap > 0, "wrap-around never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
