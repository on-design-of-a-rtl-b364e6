// pp_mem_cell_tb: checks the write-enable memory cell. Each clock cycle gets
// random D and W, set while clk is low and held through the high phase. On the
// falling edge the cell must take D when W = 1 and keep its old value when
// W = 0; Q must not move at any other time. clk_o and w_o must copy clk and W.
// Both write and hold cycles are counted and must each occur.
module pp_mem_cell_tb;
  logic clk = 1'b0, d = 1'b0, w = 1'b0;
  logic q, clk_o, w_o;
  int checks = 0, failures = 0, writes = 0, holds = 0;
  logic model;

  pp_mem_cell dut (.d, .clk, .w, .q, .clk_o, .w_o);

  task automatic check(input logic got, input logic exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp_v);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("pp_mem_cell_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // known start: write a 0
    d = 1'b0; w = 1'b1; #1 clk = 1'b1; #4 clk = 1'b0; #5;
    model = 1'b0;
    check(q, model, "initial write");
    for (int cyc = 0; cyc < 300; cyc++) begin
      d = 1'($urandom);
      w = 1'($urandom);
      #1;
      check(w_o, w, "w_o");
      check(q, model, "q before edge");
      clk = 1'b1;
      #1 check(clk_o, 1'b1, "clk_o");
      check(q, model, "q while clk high");
      #3 clk = 1'b0;
      if (w) begin model = d; writes++; end else holds++;
      #1 check(q, model, "q after falling edge");
      check(clk_o, 1'b0, "clk_o low");
      // change the inputs while clk is low: nothing may happen
      d = ~d;
      #4 check(q, model, "q stable while clk low");
    end
    checks++;
    if (writes == 0 || holds == 0) begin
      failures++;
      $display("FAIL writes=%0d holds=%0d", writes, holds);
    end
    $display("mem cell: %0d write cycles, %0d hold cycles", writes, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
