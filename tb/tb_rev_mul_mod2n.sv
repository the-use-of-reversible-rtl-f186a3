// Self-checking testbench for rev_mul_mod2n, the modulo 2^N multiplier.
// Exhaustive for N = 4 (default), N = 2 and N = 6: p must equal (x*y) mod 2^N.
// Watchdog included.
module tb_rev_mul_mod2n;
  int checks = 0, failures = 0;
  logic [3:0] x4, y4, p4;
  logic [1:0] x2, y2, p2;
  logic [5:0] x6, y6, p6;

  rev_mul_mod2n            dut (.x(x4), .y(y4), .p(p4));
  rev_mul_mod2n #(.N(2))   u2  (.x(x2), .y(y2), .p(p2));
  rev_mul_mod2n #(.N(6))   u6  (.x(x6), .y(y6), .p(p6));

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
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        x6 = 6'(i); y6 = 6'(j); x4 = 4'(i); y4 = 4'(j); x2 = 2'(i); y2 = 2'(j);
        #1;
        chk(int'(p6) == (i * j) % 64, $sformatf("N=6 %0d*%0d=%0d", i, j, p6));
        if (i < 16 && j < 16) chk(int'(p4) == (i * j) % 16, $sformatf("N=4 %0d*%0d=%0d", i, j, p4));
        if (i < 4 && j < 4) chk(int'(p2) == (i * j) % 4, "N=2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
