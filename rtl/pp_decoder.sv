// pp_decoder: parity preserving reversible n x 2^n decoder.
//
// The first level is an F2G gate fed (A, 1, 0) with the most significant
// address bit, giving A' and A (the 1x2 decoder). Each further level takes the
// next lower address bit as the control of one FRG gate per existing line,
// with the FRG's third input tied to 0, so each line x splits into
// (x & ~bit, x & bit). After N levels the 2^N lines are one-hot and
// out[k] is 1 exactly when in == k. Gate count is 1 + 2 + ... + 2^(N-1)
// = 2^N - 1, as in the design's cost table.
// Design choice: within a level the address bit is not fanned out but passed
// from one FRG to the next through the FRG's P output (the last P of a level
// is left unused). Purely combinational; N defaults to 3 (a 3x8 decoder,
// the example size quoted for this decoder).
module pp_decoder #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0]    in,
  output logic [2**N-1:0] out
);
  // lines[k] holds the 2^(k+1) outputs of level k (only the low ones used)
  logic [2**N-1:0] lines [N];
  logic            f2g_garbage;

  f2g_gate u_first (
    .a(in[N-1]), .b(1'b1), .c(1'b0),
    .p(lines[0][1]), .q(lines[0][0]), .r(f2g_garbage)
  );

  if (N < 2) begin : g_no_levels
    // a 1x2 decoder is the F2G alone
  end else begin : g_levels
    for (genvar k = 1; k < N; k++) begin : g_lvl
      localparam int unsigned NIN = 2**k;
      logic [NIN:0] ctrl;   // address bit passed along the level
      assign ctrl[0] = in[N-1-k];
      for (genvar j = 0; j < NIN; j++) begin : g_gate
        frg_gate u_frg (
          .a(ctrl[j]), .b(lines[k-1][j]), .c(1'b0),
          .p(ctrl[j+1]), .q(lines[k][2*j]), .r(lines[k][2*j+1])
        );
      end
      if (2*NIN < 2**N) begin : g_pad
        assign lines[k][2**N-1:2*NIN] = '0;
      end
    end
  end

  if (N > 1) begin : g_pad0
    assign lines[0][2**N-1:2] = '0;
  end

  assign out = lines[N-1];
endmodule
