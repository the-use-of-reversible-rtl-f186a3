// Self-checking testbench for rev_mul_mod2nm1, the modulo 2^N-1 multiplier.
// Exhaustive over all residue pairs for N = 4 (default), N = 3 and N = 5: the
// product must be congruent to x*y modulo 2^N-1; a result of 2^N-1 (second zero
// code) is counted and reported, not failed. Watchdog included.
module tb_rev_mul_mod2nm1;
  int checks = 0, failures = 0, n_dz = 0;
  logic [3:0] x4, y4, p4;
  logic [2:0] x3, y3, p3;
  logic [4:0] x5, y5, p5;

  rev_mul_mod2nm1            dut (.x(x4), .y(y4), .p(p4));
  rev_mul_mod2nm1 #(.N(3))   u3  (.x(x3), .y(y3), .p(p3));
  rev_mul_mod2nm1 #(.N(5))   u5  (.x(x5), .y(y5), .p(p5));

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
    for (int i = 0; i < 31; i++) begin
      for (int j = 0; j < 31; j++) begin
        x4 = 4'(i % 15); y4 = 4'(j % 15);
        x3 = 3'(i % 7);  y3 = 3'(j % 7);
        x5 = 5'(i);      y5 = 5'(j);
        #1;
        chk(int'(p4) % 15 == (int'(x4) * int'(y4)) % 15,
            $sformatf("N=4 %0d*%0d=%0d", x4, y4, p4));
        chk(int'(p3) % 7 == (int'(x3) * int'(y3)) % 7, "N=3");
        chk(int'(p5) % 31 == (int'(x5) * int'(y5)) % 31, "N=5");
        if (p4 == 4'hf) n_dz++;
      end
    end
    $display("second zero code produced %0d times", n_dz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
