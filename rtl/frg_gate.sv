// frg_gate: Fredkin gate (FRG), the 3x3 conservative reversible gate used
// for every multiplexer, the decoder levels and the write-enable selector of
// the memory cell.
//
// A is the control and is passed through on P. When A is 0, B and C go
// straight through to Q and R; when A is 1 they are swapped:
//   P = A,  Q = A'B + AC,  R = A'C + AB.
// Used as a 2:1 multiplexer, Q is (A ? C : B). With C tied to 0 it splits a
// line into (A'B, AB), which is how each decoder level doubles its outputs.
// The gate keeps the number of ones (and so the parity) of its inputs; an
// assertion checks the parity on every evaluation. Purely combinational.
// The equations are the standard Fredkin gate named by the design.
module frg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) | (a & c);
    r = (~a & c) | (a & b);
    assert ((a ^ b ^ c) == (p ^ q ^ r))
      else $error("frg_gate: parity not preserved");
  end
endmodule
