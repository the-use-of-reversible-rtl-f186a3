// Self-checking testbench for rev_sum_mod2np1, the multi-operand modulo 2^N+1
// adder. Random rows for three configurations: the default (N = 4, four rows,
// BIAS = 0), one whose constant row needs the final adder's carry input
// (N = 4, BIAS = -3), and a wide one (N = 8, six rows, BIAS = 100). The output must
// equal (sum of rows - BIAS) mod (2^N+1). A watchdog ends a hung run.
module tb_rev_sum_mod2np1;
  int checks = 0, failures = 0;
  logic [3:0][3:0] r4;
  logic [5:0][7:0] r8;
  logic [4:0]      y0, y1;
  logic [8:0]      y2;

  rev_sum_mod2np1                                        dut (.rows(r4), .y(y0));
  rev_sum_mod2np1 #(.N(4), .ROWS(4), .BIAS(-3))          ucin (.rows(r4), .y(y1));
  rev_sum_mod2np1 #(.N(8), .ROWS(6), .BIAS(100))         u8 (.rows(r8), .y(y2));

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
    for (int v = 0; v < 3000; v++) begin
      int s4, s8;
      r4 = 16'($urandom);
      r8 = 48'({$urandom, $urandom});
      #1;
      s4 = 0; s8 = 0;
      for (int i = 0; i < 4; i++) s4 += int'(r4[i]);
      for (int i = 0; i < 6; i++) s8 += int'(r8[i]);
      chk(int'(y0) == s4 % 17, $sformatf("BIAS 0 rows=%h y=%0d", r4, y0));
      chk(int'(y1) == (s4 + 3) % 17, "BIAS -3");
      chk(int'(y2) == ((s8 - 100) % 257 + 257) % 257, "N=8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
