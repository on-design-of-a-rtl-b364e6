// f2g_gate: Feynman double gate (F2G), a 3x3 parity preserving reversible
// gate. It is the design's copying element, since a reversible circuit may not
// fan a signal out: with B = C = 0 all three outputs carry A.
//   P = A,  Q = A ^ B,  R = A ^ C.
// With (A, 1, 0) it is the parity preserving 1x2 decoder: (A, A', A).
// Purely combinational; an assertion checks input and output parity agree.
module f2g_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = a ^ c;
    assert ((a ^ b ^ c) == (p ^ q ^ r))
      else $error("f2g_gate: parity not preserved");
  end
endmodule
