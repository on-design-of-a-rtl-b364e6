// pp_ms_dff: parity preserving reversible master-slave D flip-flop built
// from one PH3 gate and one F2G gate. It changes state on the falling edge
// of clk.
//
// The PH3 gate is wired with A = clk, B = slave output (fed back through the
// F2G), C = master output, D = data:
//   S (4th output) = clk & D  | ~clk & Qs   -> master latch
//   Q (2nd output) = clk & Qs | ~clk & Qm   -> slave latch
// While clk is high the master follows D and the slave holds; while clk is
// low the slave takes the master's value. The value of D just before the
// falling edge therefore appears on q right after it, and q holds while clk
// stays high or low. The F2G, fed (Qs, 0, 0), copies the slave output: P
// goes back to the PH3 B input, Q is the flip-flop output q, R is a second
// copy brought out on q_copy (the write-enable cell uses it for its hold
// path; it is garbage otherwise). PH3's P output passes clk on to clk_o so a
// row of cells can share one clock line without fan-out.
//
// Modelling: the two storage nodes of the gate loop are written as
// level-sensitive latches (always_latch) whose enables are the clock phases
// in which the PH3 equations pass data to them, so the master and slave
// latches are intended and stand as such in the circuit warnings. The
// feedback through the F2G is the latch hold loop of the original circuit.
// Lint tools report the storage nodes as circular logic (UNOPTFLAT): the
// loop Qs -> F2G -> PH3 -> Qs is the slave latch's own hold path, and in the
// memory cell the hold path Qs -> FRG -> master -> slave closes a second one.
// Each loop passes through a latch that is opaque whenever the loop could
// matter (master and slave are never transparent together), so it settles in
// one pass; these warnings are inherent to the master-slave latch structure
// and are left as they are.
// The latches have no reset: like a RAM cell they power up holding an
// arbitrary value until the first write.
module pp_ms_dff (
  input  logic clk,
  input  logic d,
  output logic q,       // flip-flop output (F2G second output)
  output logic q_copy,  // second copy of the output (F2G third output)
  output logic qm,      // master latch output
  output logic clk_o    // clock passed through PH3
);
  logic qs;             // slave latch
  logic qm_l;           // master latch
  logic qs_fb;
  logic master_in, slave_in, ph3_garbage;

  ph3_gate u_ph3 (
    .a(clk), .b(qs_fb), .c(qm_l), .d(d),
    .p(clk_o), .q(slave_in), .r(ph3_garbage), .s(master_in)
  );

  always_latch begin
    if (clk) qm_l = master_in;
  end

  always_latch begin
    if (!clk) qs = slave_in;
  end

  f2g_gate u_f2g (
    .a(qs), .b(1'b0), .c(1'b0),
    .p(qs_fb), .q(q), .r(q_copy)
  );

  assign qm = qm_l;
endmodule
