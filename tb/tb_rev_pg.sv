// Exhaustive self-checking testbench for rev_pg (Peres gate).
// Applies all 8 input combinations and compares every output with the gate's
// truth table written independently here; for the Fredkin gate the swap is
// written as a multiplexer. Also checks that the gate is reversible: the
// 8 output patterns are all different. A watchdog ends a hung run.
module tb_rev_pg;
  logic a, b, c;
  logic p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;
  rev_pg dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== (a)) begin failures++; $display("FAIL v=%0d p=%b", v, p); end
      checks++;
      if (q !== (a ^ b)) begin failures++; $display("FAIL v=%0d q=%b", v, q); end
      checks++;
      if (r !== ((a & b) ^ c)) begin failures++; $display("FAIL v=%0d r=%b", v, r); end
      checks++;
      if (seen[{p, q, r}]) begin failures++; $display("FAIL output pattern repeated at v=%0d", v); end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
