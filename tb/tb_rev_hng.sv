// Exhaustive self-checking testbench for rev_hng (HNG gate).
// Applies all 16 input combinations and compares every output with the gate's
// truth table written independently here; for the Fredkin gate the swap is
// written as a multiplexer. Also checks that the gate is reversible: the
// 16 output patterns are all different. A watchdog ends a hung run.
module tb_rev_hng;
  logic a, b, c, d;
  logic p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;
  rev_hng dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if (p !== (a)) begin failures++; $display("FAIL v=%0d p=%b", v, p); end
      checks++;
      if (q !== (b)) begin failures++; $display("FAIL v=%0d q=%b", v, q); end
      checks++;
      if (r !== (a ^ b ^ c)) begin failures++; $display("FAIL v=%0d r=%b", v, r); end
      checks++;
      if (s !== (((a ^ b) & c) ^ (a & b) ^ d)) begin failures++; $display("FAIL v=%0d s=%b", v, s); end
      checks++;
      if (seen[{p, q, r, s}]) begin failures++; $display("FAIL output pattern repeated at v=%0d", v); end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
