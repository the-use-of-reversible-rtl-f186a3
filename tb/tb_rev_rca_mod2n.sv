// Self-checking testbench for rev_rca_mod2n, the modulo 2^N ripple-carry adder.
// Exhaustive over a, b (4 bits) and cin, and random over 12-bit operands:
// y must equal (a + b + cin) mod 2^N. A watchdog ends a hung run.
module tb_rev_rca_mod2n;
  int checks = 0, failures = 0;
  logic [3:0]  a, b, y;
  logic [11:0] a12, b12, y12;
  logic        cin;

  rev_rca_mod2n             dut (.a(a), .b(b), .cin(cin), .y(y));
  rev_rca_mod2n #(.N(12))   u12 (.a(a12), .b(b12), .cin(cin), .y(y12));

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
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      a12 = 12'($urandom); b12 = 12'($urandom);
      #1;
      chk(int'(y) == (int'(a) + int'(b) + int'(cin)) % 16,
          $sformatf("N=4 a=%0d b=%0d cin=%0d y=%0d", a, b, cin, y));
      chk(int'(y12) == (int'(a12) + int'(b12) + int'(cin)) % 4096, "N=12");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
