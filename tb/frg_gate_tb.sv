// frg_gate_tb: exhaustive test of the Fredkin gate. For all eight input
// vectors it checks the outputs against the controlled-swap rule, checks that
// the number of ones is kept (conservative gate), and checks that the eight
// output vectors are all different (the gate is reversible).
module frg_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen = '0;

  frg_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin
    #100000;
    failures++;
    $display("frg_gate_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] exp_o;
      {a, b, c} = 3'(v);
      #1;
      exp_o = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp_o) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", {a, b, c}, {p, q, r}, exp_o);
      end
      checks++;
      if ($countones({a, b, c}) != $countones({p, q, r})) begin
        failures++;
        $display("FAIL not conservative in=%b", {a, b, c});
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) begin
      failures++;
      $display("FAIL not reversible, outputs seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
