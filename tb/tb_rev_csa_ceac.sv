// Self-checking testbench for rev_csa_ceac, the carry-save adder with complemented
// end-around carry. Exhaustive over three 4-bit operands (default N = 4) and random
// over three 7-bit operands: s + cv - 1 must be congruent to a + b + c modulo
// 2^N+1. A watchdog ends a hung run.
module tb_rev_csa_ceac;
  int checks = 0, failures = 0;
  logic [3:0] a, b, c, s, cv;
  logic [6:0] a7, b7, c7, s7, cv7;

  rev_csa_ceac              dut (.a(a), .b(b), .c(c), .s(s), .cv(cv));
  rev_csa_ceac #(.N(7))     u7  (.a(a7), .b(b7), .c(c7), .s(s7), .cv(cv7));

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
    for (int v = 0; v < 4096; v++) begin
      {a, b, c} = 12'(v);
      a7 = 7'($urandom); b7 = 7'($urandom); c7 = 7'($urandom);
      #1;
      chk((int'(s) + int'(cv) - 1 + 17) % 17 == (int'(a) + int'(b) + int'(c)) % 17,
          $sformatf("N=4 a=%0d b=%0d c=%0d s=%0d cv=%0d", a, b, c, s, cv));
      chk((int'(s7) + int'(cv7) - 1 + 129) % 129 == (int'(a7) + int'(b7) + int'(c7)) % 129,
          "N=7");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
