// pp_ms_dff_tb: checks the falling-edge behaviour of the master-slave flip-flop.
// Each 10-unit clock cycle is high for 5 and low for 5. The data input is
// changed several times in each phase. Checked: while clk is high the master
// output follows d and q holds the value taken at the last falling edge; one
// unit after the falling edge q equals the last d seen before it; while clk
// is low, changes on d reach neither q nor the master; clk_o follows clk.
module pp_ms_dff_tb;
  logic clk = 1'b0, d = 1'b0;
  logic q, q_copy, qm, clk_o;
  int checks = 0, failures = 0;
  logic expected_q;

  pp_ms_dff dut (.clk, .d, .q, .q_copy, .qm, .clk_o);

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
    $display("pp_ms_dff_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic last_d, qm_low;
    // first falling edge sets a known state
    d = 1'b1; #1 clk = 1'b1; #4 clk = 1'b0; #1;
    expected_q = 1'b1;
    check(q, 1'b1, "initial load");
    #4;
    for (int cyc = 0; cyc < 200; cyc++) begin
      // high phase: master transparent, slave holding
      clk = 1'b1;
      for (int k = 0; k < 4; k++) begin
        d = 1'($urandom);
        #1;
        check(qm, d, "master follows d");
        check(q, expected_q, "q holds while clk high");
        check(q_copy, q, "q_copy");
        check(clk_o, 1'b1, "clk_o high");
      end
      last_d = d;
      #1 clk = 1'b0;
      #1;
      expected_q = last_d;
      check(q, expected_q, "q after falling edge");
      check(clk_o, 1'b0, "clk_o low");
      qm_low = qm;
      // low phase: new data must not get in
      for (int k = 0; k < 3; k++) begin
        d = 1'($urandom);
        #1;
        check(q, expected_q, "q holds while clk low");
        check(qm, qm_low, "master holds while clk low");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
