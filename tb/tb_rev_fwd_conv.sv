// Self-checking testbench for rev_fwd_conv, the binary-to-residue converter.
// Exhaustive over every (3N+K)-bit input for N = 4, K = 0 (default) and N = 4,
// K = 2, and random inputs for N = 5, K = 5: x1 must be congruent to X modulo 2^N-1
// (either zero code), x2 equal to X mod 2^(N+K), and x3 equal to X mod (2^N+1).
// Counts the second zero code and the residue value 2^N. Watchdog included.
module tb_rev_fwd_conv;
  int checks = 0, failures = 0, n_dz = 0, n_top = 0;
  logic [11:0] xa;  logic [3:0] a1; logic [3:0] a2; logic [4:0] a3;
  logic [13:0] xb;  logic [3:0] b1; logic [5:0] b2; logic [4:0] b3;
  logic [19:0] xc;  logic [4:0] c1; logic [9:0] c2; logic [5:0] c3;

  rev_fwd_conv                    dut (.x(xa), .x1(a1), .x2(a2), .x3(a3));
  rev_fwd_conv #(.N(4), .K(2))    uk2 (.x(xb), .x1(b1), .x2(b2), .x3(b3));
  rev_fwd_conv #(.N(5), .K(5))    uk5 (.x(xc), .x1(c1), .x2(c2), .x3(c3));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16384; v++) begin
      xa = 12'(v); xb = 14'(v); xc = 20'($urandom);
      #1;
      if (v < 4096) begin
        chk(int'(a1) % 15 == v % 15, $sformatf("K=0 x1 X=%0d got %0d", v, a1));
        chk(int'(a2) == v % 16, "K=0 x2");
        chk(int'(a3) == v % 17, $sformatf("K=0 x3 X=%0d got %0d", v, a3));
        if (a1 == 4'hf) n_dz++;
        if (a3 == 5'd16) n_top++;
      end
      chk(int'(b1) % 15 == v % 15, "K=2 x1");
      chk(int'(b2) == v % 64, "K=2 x2");
      chk(int'(b3) == v % 17, $sformatf("K=2 x3 X=%0d got %0d", v, b3));
      chk(int'(c1) % 31 == int'(xc) % 31, "N=5 K=5 x1");
      chk(int'(c2) == int'(xc) % 1024, "N=5 K=5 x2");
      chk(int'(c3) == int'(xc) % 33, "N=5 K=5 x3");
    end
    chk(n_dz > 0 && n_top > 0, "zero code and 2^N residue exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
