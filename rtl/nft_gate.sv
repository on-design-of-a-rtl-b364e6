// nft_gate: New Fault Tolerant gate (NFT), a 3x3 parity preserving
// reversible gate. The RAM uses it as a two-input AND: with A tied to 0,
// R = B & C, which combines a decoder line with the write-enable line.
//   P = A ^ B,  Q = B'C ^ AC',  R = BC ^ AC'.
// The equations are the published NFT gate; the design only names the gate
// and its AND role. Purely combinational; an assertion checks parity.
module nft_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a ^ b;
    q = (~b & c) ^ (a & ~c);
    r = (b & c) ^ (a & ~c);
    assert ((a ^ b ^ c) == (p ^ q ^ r))
      else $error("nft_gate: parity not preserved");
  end
endmodule
