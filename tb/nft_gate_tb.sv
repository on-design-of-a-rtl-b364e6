// nft_gate_tb: exhaustive test of the NFT gate against a written-out truth
// table, with parity and reversibility checks, and of the AND use made of it
// in the RAM: with A = 0, R = B & C.
module nft_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen = '0;
  // expected {P,Q,R} for input {A,B,C} = 0..7
  localparam logic [2:0] TABLE [8] = '{
    3'b000, 3'b010, 3'b100, 3'b101, 3'b111, 3'b110, 3'b011, 3'b001
  };

  nft_gate dut (.a, .b, .c, .p, .q, .r);

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
      checks++;
      if ({p, q, r} !== TABLE[v]) begin
        failures++;
        $display("FAIL in=%b out=%b exp=%b", {a, b, c}, {p, q, r}, TABLE[v]);
      end
      checks++;
      if ((^{a, b, c}) != (^{p, q, r})) begin
        failures++;
        $display("FAIL parity in=%b", {a, b, c});
      end
      if (a == 1'b0) begin
        checks++;
        if (r !== (b & c)) begin
          failures++;
          $display("FAIL AND use b=%b c=%b r=%b", b, c, r);
        end
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) begin
      failures++;
      $display("FAIL not reversible");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
