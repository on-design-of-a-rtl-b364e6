// f2g_gate_tb: exhaustive test of the Feynman double gate: outputs against
// P=A, Q=A^B, R=A^C, parity kept, reversibility, and the two uses made of
// it in the RAM: copying (A,0,0) -> (A,A,A) and the 1x2 decoder
// (A,1,0) -> (A,A',A).
module f2g_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen = '0;

  f2g_gate dut (.a, .b, .c, .p, .q, .r);

  task automatic expect3(input logic [2:0] exp_o, input string what);
    checks++;
    if ({p, q, r} !== exp_o) begin
      failures++;
      $display("FAIL %s in=%b out=%b exp=%b", what, {a, b, c}, {p, q, r}, exp_o);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      // truth table written out: B and C are inverted when A is 1
      expect3(a ? {1'b1, ~b, ~c} : {1'b0, b, c}, "table");
      checks++;
      if ((^{a, b, c}) != (^{p, q, r})) begin
        failures++;
        $display("FAIL parity in=%b", {a, b, c});
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) begin
      failures++;
      $display("FAIL not reversible");
    end
    {a, b, c} = 3'b000; #1; expect3(3'b000, "copy 0");
    {a, b, c} = 3'b100; #1; expect3(3'b111, "copy 1");
    {a, b, c} = 3'b010; #1; expect3(3'b010, "decode 0");
    {a, b, c} = 3'b110; #1; expect3(3'b101, "decode 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
