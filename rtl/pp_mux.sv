// pp_mux: parity preserving reversible 2^M x 1 multiplexer.
//
// A binary tree of FRG gates, each used as a 2:1 multiplexer (control on A,
// the two data inputs on B and C, result on Q = A ? C : B). The first level
// pairs adjacent inputs under sel[0], the next level pairs those results under
// sel[1], and so on up to sel[M-1], so out = in[sel]. The tree holds
// 2^M - 1 FRG gates, matching the design's cost table.
// Design choice: within a level the select bit is passed from one FRG to the
// next through P instead of being fanned out, and the last P of each level is
// brought out on sel_o so several multiplexers can share one select bus in a
// chain. Purely combinational; M defaults to 3 (an 8x1 multiplexer, the
// example size quoted for this multiplexer).
module pp_mux #(
  parameter int unsigned M = 3
) (
  input  logic [2**M-1:0] in,
  input  logic [M-1:0]    sel,
  output logic            out,
  output logic [M-1:0]    sel_o
);
  // node[k] holds the 2^(M-k) values entering level k; node[0] is the input
  logic [2**M-1:0] node [M+1];
  assign node[0] = in;

  for (genvar k = 0; k < M; k++) begin : g_lvl
    localparam int unsigned NG = 2**(M-k-1);   // gates on this level
    logic [NG:0] ctrl;
    assign ctrl[0] = sel[k];
    for (genvar j = 0; j < NG; j++) begin : g_gate
      logic unused_r;
      frg_gate u_frg (
        .a(ctrl[j]), .b(node[k][2*j]), .c(node[k][2*j+1]),
        .p(ctrl[j+1]), .q(node[k+1][j]), .r(unused_r)
      );
    end
    assign node[k+1][2**M-1:NG] = '0;
    assign sel_o[k] = ctrl[NG];
  end

  assign out = node[M][0];
endmodule
