// pp_mem_cell: parity preserving reversible memory cell, a write-enable
// master-slave D flip-flop made of an FRG gate in front of pp_ms_dff
// (FRG + PH3 + F2G, three gates).
//
// Inputs D, clk and W, outputs Q, clk_o and w_o. The FRG has W on its control
// input, the stored value (the flip-flop's q_copy) on B and D on C, so its Q
// output is W ? D : stored. That value is the flip-flop's data input: with
// W = 0 the cell reloads its own contents and never changes; with W = 1 it
// takes D on the next falling edge of clk. W and clk leave the cell unchanged
// on w_o (FRG P) and clk_o (PH3 P), so cells in a row are chained on these
// two lines instead of fanning them out.
// Timing: W and D must be stable while clk is high and up to its falling
// edge; Q changes right after that edge.
module pp_mem_cell (
  input  logic d,
  input  logic clk,
  input  logic w,
  output logic q,
  output logic clk_o,
  output logic w_o
);
  logic stored, din_sel, frg_garbage, qm_unused;

  frg_gate u_frg (
    .a(w), .b(stored), .c(d),
    .p(w_o), .q(din_sel), .r(frg_garbage)
  );

  pp_ms_dff u_ff (
    .clk(clk), .d(din_sel),
    .q(q), .q_copy(stored), .qm(qm_unused), .clk_o(clk_o)
  );
endmodule
