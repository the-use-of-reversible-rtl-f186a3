// Self-checking testbench for rev_mul_mod2np1, the modulo 2^N+1 multiplier.
// Exhaustive over all residue pairs 0 .. 2^N for N = 4 (default), N = 2, N = 3 and
// N = 6: p must equal (x*y) mod (2^N+1) exactly, including the operand and product
// value 2^N. Watchdog included.
module tb_rev_mul_mod2np1;
  int checks = 0, failures = 0, n_top = 0;
  logic [4:0] x4, y4, p4;
  logic [2:0] x2, y2, p2;
  logic [3:0] x3, y3, p3;
  logic [6:0] x6, y6, p6;

  rev_mul_mod2np1            dut (.x(x4), .y(y4), .p(p4));
  rev_mul_mod2np1 #(.N(2))   u2  (.x(x2), .y(y2), .p(p2));
  rev_mul_mod2np1 #(.N(3))   u3  (.x(x3), .y(y3), .p(p3));
  rev_mul_mod2np1 #(.N(6))   u6  (.x(x6), .y(y6), .p(p6));

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
    for (int i = 0; i <= 64; i++) begin
      for (int j = 0; j <= 64; j++) begin
        x6 = 7'(i); y6 = 7'(j);
        x4 = 5'(i % 17); y4 = 5'(j % 17);
        x3 = 4'(i % 9);  y3 = 4'(j % 9);
        x2 = 3'(i % 5);  y2 = 3'(j % 5);
        #1;
        chk(int'(p6) == (i * j) % 65, $sformatf("N=6 %0d*%0d=%0d", i, j, p6));
        chk(int'(p4) == (int'(x4) * int'(y4)) % 17, $sformatf("N=4 %0d*%0d=%0d", x4, y4, p4));
        chk(int'(p3) == (int'(x3) * int'(y3)) % 9, $sformatf("N=3 %0d*%0d=%0d", x3, y3, p3));
        chk(int'(p2) == (int'(x2) * int'(y2)) % 5, $sformatf("N=2 %0d*%0d=%0d", x2, y2, p2));
        if (p4 == 5'd16) n_top++;
      end
    end
    chk(n_top > 0, "product 2^N produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
