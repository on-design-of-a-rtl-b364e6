// ph3_gate_tb: exhaustive test of the PH3 gate against its 16-row truth table
// (written out below as {P,Q,R,S} per input {A,B,C,D}), with checks that the
// gate is conservative and reversible.
module ph3_gate_tb;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [15:0] seen = '0;
  localparam logic [3:0] TABLE [16] = '{
    4'b0000, 4'b0010, 4'b0100, 4'b0110, 4'b0001, 4'b0011, 4'b0101, 4'b0111,
    4'b1000, 4'b1001, 4'b1010, 4'b1011, 4'b1100, 4'b1101, 4'b1110, 4'b1111
  };

  ph3_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks++;
      if ({p, q, r, s} !== TABLE[v]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", {a, b, c, d}, {p, q, r, s}, TABLE[v]);
      end
      checks++;
      if ($countones({a, b, c, d}) != $countones({p, q, r, s})) begin
        failures++;
        $display("FAIL not conservative in=%b", {a, b, c, d});
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen != 16'hffff) begin
      failures++;
      $display("FAIL not reversible");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
