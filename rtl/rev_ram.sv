// RAM gate: an N-line reversible copy circuit built from Feynman gates.
//
// Line 0 carries the signal to copy; the other lines enter as constant 0 and leave
// as copies, so the partial-product units use it to fan one operand bit out to N
// AND gates (a reversible circuit allows a fan-out of one).
//
// TREE = 0 is the classic gate: a chain of N-1 Feynman gates,
//   out[0] = in[0], out[i] = out[i-1] ^ in[i],
// which for N = 4 is P = A, Q = A^B, R = A^B^C, S = A^B^C^D. Its depth is N-1.
// TREE = 1 (default) is the low-depth copy circuit: line i is the target of one
// Feynman gate whose control is line i - 2^floor(log2 i), a line that already holds
// a copy, so the number of copies doubles at every level and the depth is
// ceil(log2 N). Inputs of the copy lines that are not 0 are XORed into the copy, as
// any Feynman gate does. The doubling schedule is this design's choice: the low-depth
// gate's published depths (1, 2, 3, 4 ... for 2, 4, 7, 12 ... lines) grow a little
// more slowly than doubling, and its exact gate order is not given.
// Combinational, no timing.
module rev_ram #(
  parameter int unsigned N    = 4,
  parameter bit          TREE = 1'b1
) (
  input  logic [N-1:0] in,
  output logic [N-1:0] out
);

  function automatic int unsigned parent(int unsigned i);
    int unsigned p2;
    p2 = 1;
    while (p2 * 2 <= i) p2 = p2 * 2;
    return TREE ? i - p2 : i - 1;
  endfunction

  assign out[0] = in[0];

  for (genvar i = 1; i < N; i++) begin : g_line
    logic ctl_unused;
    rev_fg u_fg (.a(out[parent(i)]), .b(in[i]), .p(ctl_unused), .q(out[i]));
  end

endmodule
