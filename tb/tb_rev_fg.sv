// Exhaustive self-checking testbench for rev_fg (Feynman gate).
// Applies all 4 input combinations and compares every output with the gate's
// truth table written independently here; for the Fredkin gate the swap is
// written as a multiplexer. Also checks that the gate is reversible: the
// 4 output patterns are all different. A watchdog ends a hung run.
module tb_rev_fg;
  logic a, b;
  logic p, q;
  int checks = 0, failures = 0;
  bit [3:0] seen;
  rev_fg dut (.a(a), .b(b), .p(p), .q(q));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== (a)) begin failures++; $display("FAIL v=%0d p=%b", v, p); end
      checks++;
      if (q !== (a ^ b)) begin failures++; $display("FAIL v=%0d q=%b", v, q); end
      checks++;
      if (seen[{p, q}]) begin failures++; $display("FAIL output pattern repeated at v=%0d", v); end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
