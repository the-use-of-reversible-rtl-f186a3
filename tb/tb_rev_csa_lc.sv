// Self-checking testbench for rev_csa_lc, the modulo 2^N carry-save adder with one
// constant input fewer. Exhaustive over three 4-bit operands (default) and three
// 2-bit operands (the two-bit case of the published drawing): s + cv must equal
// a + b + c modulo 2^N, and cv[0] must be 0. A watchdog ends a hung run.
module tb_rev_csa_lc;
  int checks = 0, failures = 0;
  logic [3:0] a, b, c, s, cv;
  logic [1:0] a2, b2, c2, s2, cv2;

  rev_csa_lc            dut (.a(a), .b(b), .c(c), .s(s), .cv(cv));
  rev_csa_lc #(.N(2))   u2  (.a(a2), .b(b2), .c(c2), .s(s2), .cv(cv2));

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
      {a2, b2, c2} = 6'(v);
      #1;
      chk((int'(s) + int'(cv)) % 16 == (int'(a) + int'(b) + int'(c)) % 16,
          $sformatf("N=4 a=%0d b=%0d c=%0d", a, b, c));
      chk(cv[0] == 1'b0, "cv[0]");
      chk((int'(s2) + int'(cv2)) % 4 == (int'(a2) + int'(b2) + int'(c2)) % 4, "N=2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
