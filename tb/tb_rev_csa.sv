// Self-checking testbench for rev_csa, the carry-save adder.
// Exhaustive over three 4-bit operands for both variants: with end-around carry the
// sum and carry vectors must add up to a+b+c modulo 15, without it modulo 16 (and
// cv[0] must be 0). The top carry output is checked against the carry of the top
// bit, computed here from the operands. A watchdog ends a hung run.
module tb_rev_csa;
  int checks = 0, failures = 0;
  logic [3:0] a, b, c, s_e, cv_e, s_r, cv_r;
  logic       co_e, co_r;
  int         eac_seen = 0;

  rev_csa                       dut (.a(a), .b(b), .c(c), .s(s_e), .cv(cv_e), .cout(co_e));
  rev_csa #(.N(4), .EAC(1'b0))  ureg (.a(a), .b(b), .c(c), .s(s_r), .cv(cv_r), .cout(co_r));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s a=%0d b=%0d c=%0d", what, a, b, c); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int tot, top;
      {a, b, c} = 12'(v);
      #1;
      tot = a + b + c;
      top = (int'(a[3]) + int'(b[3]) + int'(c[3])) >= 2;
      chk((int'(s_e) + int'(cv_e)) % 15 == tot % 15, "EAC sum");
      chk((int'(s_r) + int'(cv_r)) % 16 == tot % 16, "regular sum");
      chk(cv_r[0] == 1'b0, "regular cv[0]");
      chk(int'(co_e) == top, "cout");
      chk(s_e == (a ^ b ^ c), "sum vector");
      if (co_e) eac_seen++;
    end
    chk(eac_seen > 0, "end-around carry exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
