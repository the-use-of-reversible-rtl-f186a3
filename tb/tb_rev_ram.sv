// Self-checking testbench for rev_ram, the RAM copy gate.
// Three instances: the default low-depth tree (4 lines), a 12-line tree, and the
// classic Feynman chain (TREE = 0). With the copy lines at 0 every output must equal
// the source bit. For the chain, every input pattern is checked against the closed
// form out[i] = in[0] ^ ... ^ in[i]. For the 4-line tree all 16 input patterns must
// give 16 different outputs (the gate is reversible). A watchdog ends a hung run.
module tb_rev_ram;
  int checks = 0, failures = 0;
  logic [3:0]  in4, out4, outc;
  logic [11:0] in12, out12;
  bit [15:0]   seen;

  rev_ram                              dut  (.in(in4),  .out(out4));
  rev_ram #(.N(12), .TREE(1'b1))       u12  (.in(in12), .out(out12));
  rev_ram #(.N(4),  .TREE(1'b0))       uch  (.in(in4),  .out(outc));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      in4 = {3'b000, 1'(s)}; in12 = {11'b0, 1'(s)};
      #1;
      chk(out4  == {4{1'(s)}},  "4-line tree copies");
      chk(out12 == {12{1'(s)}}, "12-line tree copies");
      chk(outc  == {4{1'(s)}},  "chain copies");
    end
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      logic [3:0] ref_c;
      in4 = 4'(v);
      #1;
      ref_c[0] = in4[0];
      for (int i = 1; i < 4; i++) ref_c[i] = ref_c[i-1] ^ in4[i];
      chk(outc == ref_c, $sformatf("chain v=%0d", v));
      chk(!seen[out4], $sformatf("tree not reversible at v=%0d", v));
      seen[out4] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
