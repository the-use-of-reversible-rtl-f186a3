// Self-checking testbench for rev_rev_conv, the residue-to-binary converter.
// For every X in the dynamic range M = (2^N-1) 2^(N+K) (2^N+1), the residues are
// computed here with the % operator and fed in; the output must give X back.
// Exhaustive for N = 4, K = 0 (default, M = 4080) and N = 4, K = 2 (M = 16320);
// random for N = 6, K = 3. Whenever X mod (2^N-1) is 0 the second zero code 2^N-1
// is fed in as well, for half of the cases. Watchdog included.
module tb_rev_rev_conv;
  int checks = 0, failures = 0, n_dz = 0;
  logic [3:0] a1; logic [3:0] a2; logic [4:0] a3; logic [11:0] xa;
  logic [3:0] b1; logic [5:0] b2; logic [4:0] b3; logic [13:0] xb;
  logic [5:0] c1; logic [8:0] c2; logic [6:0] c3; logic [20:0] xc;

  rev_rev_conv                   dut (.x1(a1), .x2(a2), .x3(a3), .x(xa));
  rev_rev_conv #(.N(4), .K(2))   uk2 (.x1(b1), .x2(b2), .x3(b3), .x(xb));
  rev_rev_conv #(.N(6), .K(3))   uk3 (.x1(c1), .x2(c2), .x3(c3), .x(xc));

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
    for (int v = 0; v < 16320; v++) begin
      int xr;
      xr = int'($urandom % (63 * 512 * 65));
      a1 = 4'(v % 15); a2 = 4'(v % 16); a3 = 5'(v % 17);
      b1 = 4'(v % 15); b2 = 6'(v % 64); b3 = 5'(v % 17);
      c1 = 6'(xr % 63); c2 = 9'(xr % 512); c3 = 7'(xr % 65);
      if (v % 15 == 0 && v % 2 == 1) begin a1 = 4'hf; b1 = 4'hf; n_dz++; end
      #1;
      if (v < 4080) chk(int'(xa) == v, $sformatf("K=0 X=%0d got %0d", v, xa));
      chk(int'(xb) == v, $sformatf("K=2 X=%0d got %0d", v, xb));
      chk(int'(xc) == xr, $sformatf("N=6 K=3 X=%0d got %0d", xr, xc));
    end
    chk(n_dz > 0, "second zero code exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
