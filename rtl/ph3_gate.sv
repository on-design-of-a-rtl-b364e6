// ph3_gate: the PH3 gate, a 4x4 conservative reversible gate introduced by
// this design for its flip-flops.
//
// A is passed through on P and steers a rotation of the other three inputs:
//   A = 0:  (Q, R, S) = (C, D, B)
//   A = 1:  (Q, R, S) = (B, C, D)
// i.e. Q = A ? B : C,  R = A ? C : D,  S = A ? D : B.
// These equations are read directly off the gate's 16-row truth table. Since
// the outputs are a permutation of the inputs, the number of ones, and hence
// the parity, is preserved; an assertion checks the parity. Combinational.
module ph3_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = a ? b : c;
    r = a ? c : d;
    s = a ? d : b;
    assert ((a ^ b ^ c ^ d) == (p ^ q ^ r ^ s))
      else $error("ph3_gate: parity not preserved");
  end
endmodule
