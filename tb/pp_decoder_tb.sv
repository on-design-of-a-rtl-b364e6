// pp_decoder_tb: drives every address into decoders of 1, 2, 3 and 4 address
// bits and checks that exactly the addressed output line is high.
module pp_decoder_tb;
  int checks = 0, failures = 0;

  logic [0:0] in1;  logic [1:0]  out1;
  logic [1:0] in2;  logic [3:0]  out2;
  logic [2:0] in3;  logic [7:0]  out3;
  logic [3:0] in4;  logic [15:0] out4;

  pp_decoder #(.N(1)) dut1 (.in(in1), .out(out1));
  pp_decoder #(.N(2)) dut2 (.in(in2), .out(out2));
  pp_decoder           dut3 (.in(in3), .out(out3));
  pp_decoder #(.N(4)) dut4 (.in(in4), .out(out4));

  task automatic check(input int n, input int v, input logic [15:0] got);
    logic [15:0] exp_o;
    exp_o = 16'(1) << v;
    checks++;
    if (got !== exp_o) begin
      failures++;
      $display("FAIL N=%0d in=%0d out=%b exp=%b", n, v, got, exp_o);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      in1 = 1'(v); in2 = 2'(v); in3 = 3'(v); in4 = 4'(v);
      #1;
      if (v < 2) check(1, v, 16'(out1));
      if (v < 4) check(2, v, 16'(out2));
      if (v < 8) check(3, v, 16'(out3));
      check(4, v, out4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
