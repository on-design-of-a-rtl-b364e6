// pp_fanout_tb: checks that both values of the input reach every output of
// fan-out chains with 2 and 8 copies (and the odd case of 3 copies).
module pp_fanout_tb;
  int checks = 0, failures = 0;
  logic x;
  logic [1:0] o2;
  logic [2:0] o3;
  logic [7:0] o8;

  pp_fanout #(.COPIES(2)) dut2 (.in(x), .out(o2));
  pp_fanout #(.COPIES(3)) dut3 (.in(x), .out(o3));
  pp_fanout               dut8 (.in(x), .out(o8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      x = v[0];
      #1;
      checks += 3;
      if (o2 !== {2{x}}) begin failures++; $display("FAIL 2 copies x=%b o=%b", x, o2); end
      if (o3 !== {3{x}}) begin failures++; $display("FAIL 3 copies x=%b o=%b", x, o3); end
      if (o8 !== {8{x}}) begin failures++; $display("FAIL 8 copies x=%b o=%b", x, o8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
