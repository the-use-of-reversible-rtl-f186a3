// Self-checking testbench for rev_add_mod2nm1, the modulo 2^N-1 adder.
// Single-zero adder (default, N = 4): for every pair of residues 0 .. 14, y must be
// exactly (a + b) mod 15. Double-zero variant: for every pair of 4-bit inputs, y
// must be congruent to a + b modulo 15 (15 being the second zero code). A 9-bit
// single-zero instance is checked on random residues. Counts how often the
// all-ones correction and the end-around carry were needed. Watchdog included.
module tb_rev_add_mod2nm1;
  int checks = 0, failures = 0;
  int n_allones = 0, n_eac = 0;
  logic [3:0] a, b, y, yd;
  logic [8:0] a9, b9, y9;

  rev_add_mod2nm1                                  dut (.a(a), .b(b), .y(y));
  rev_add_mod2nm1 #(.N(4), .SINGLE_ZERO(1'b0))     udz (.a(a), .b(b), .y(yd));
  rev_add_mod2nm1 #(.N(9))                         u9  (.a(a9), .b(b9), .y(y9));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      a9 = 9'($urandom % 511); b9 = 9'($urandom % 511);
      #1;
      chk(int'(yd) % 15 == (int'(a) + int'(b)) % 15,
          $sformatf("double zero a=%0d b=%0d y=%0d", a, b, yd));
      if (a < 15 && b < 15) begin
        chk(int'(y) == (int'(a) + int'(b)) % 15,
            $sformatf("single zero a=%0d b=%0d y=%0d", a, b, y));
        if (int'(a) + int'(b) == 15) n_allones++;
        if (int'(a) + int'(b) > 15) n_eac++;
      end
      chk(int'(y9) == (int'(a9) + int'(b9)) % 511, "N=9");
    end
    chk(n_allones > 0 && n_eac > 0, "both corrections exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
