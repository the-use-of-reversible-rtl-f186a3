// Self-checking testbench for rev_add_mod2np1, the modulo 2^N+1 final adder.
// Exhaustive for N = 4 over a, b and cin, random for N = 10: {yz, y} must equal
// (a + b + cin + 1) mod (2^N+1). In diminished-one terms this is the code of the
// sum, yz flagging a zero sum; that reading is checked too for cin = 0. The
// watchdog ends a hung run.
module tb_rev_add_mod2np1;
  int checks = 0, failures = 0, n_zero = 0;
  logic [3:0] a, b, y;
  logic [9:0] a10, b10, y10;
  logic       cin, yz, yz10;

  rev_add_mod2np1             dut (.a(a), .b(b), .cin(cin), .y(y), .yz(yz));
  rev_add_mod2np1 #(.N(10))   u10 (.a(a10), .b(b10), .cin(cin), .y(y10), .yz(yz10));

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
      a10 = 10'($urandom); b10 = 10'($urandom);
      #1;
      chk(int'({yz, y}) == (int'(a) + int'(b) + int'(cin) + 1) % 17,
          $sformatf("a=%0d b=%0d cin=%0d y=%0d yz=%0d", a, b, cin, y, yz));
      chk(int'({yz10, y10}) == (int'(a10) + int'(b10) + int'(cin) + 1) % 1025, "N=10");
      if (!cin) begin
        // diminished-one: x = a+1, y = b+1 (1 .. 16); sum zero <=> yz
        int s;
        s = (int'(a) + 1 + int'(b) + 1) % 17;
        chk(yz == (s == 0), "zero flag");
        if (s != 0) chk(int'(y) == s - 1, "diminished-one code");
        else n_zero++;
      end
    end
    chk(n_zero > 0, "zero sum exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
