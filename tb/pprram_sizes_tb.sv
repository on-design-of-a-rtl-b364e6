// pprram_sizes_tb: runs random write/read traffic on the RAM at several sizes
// besides the default: 2 x 1 (single address bit, where the decoder is one F2G
// and each multiplexer one FRG), 4 x 2, 16 x 8 and 32 x 3, so that the
// generate loops of the decoder, multiplexers and fan-out chains are exercised
// at more than one depth. Each size must see writes and inhibited writes.
module pprram_sizes_tb;
  localparam int N = 4;
  logic done [N];
  int   checks [N], failures [N], writes [N], inhibits [N];
  int   total_checks, total_failures;

  pprram_traffic #(.AW(1), .DW(1)) t0 (.done(done[0]), .checks(checks[0]),
    .failures(failures[0]), .writes(writes[0]), .inhibits(inhibits[0]));
  pprram_traffic #(.AW(2), .DW(2)) t1 (.done(done[1]), .checks(checks[1]),
    .failures(failures[1]), .writes(writes[1]), .inhibits(inhibits[1]));
  pprram_traffic #(.AW(4), .DW(8)) t2 (.done(done[2]), .checks(checks[2]),
    .failures(failures[2]), .writes(writes[2]), .inhibits(inhibits[2]));
  pprram_traffic #(.AW(5), .DW(3)) t3 (.done(done[3]), .checks(checks[3]),
    .failures(failures[3]), .writes(writes[3]), .inhibits(inhibits[3]));

  initial begin
    #100000;
    $display("pprram_sizes_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    #1;  // let every checker clear its done flag first
    wait (done[0] && done[1] && done[2] && done[3]);
    total_checks = 0;
    total_failures = 0;
    for (int i = 0; i < N; i++) begin
      total_checks += checks[i] + 1;
      total_failures += failures[i];
      if (writes[i] == 0 || inhibits[i] == 0) total_failures++;
      $display("size %0d: checks=%0d failures=%0d writes=%0d inhibited=%0d",
               i, checks[i], failures[i], writes[i], inhibits[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
