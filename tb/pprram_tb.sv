// pprram_tb: end-to-end test of the RAM at its default size (8 words of
// 4 bits), checked against a plain array model.
//
// Protocol per clock cycle (10 time units, high for the first 5): addr, din
// and w are set while clk is low, held through the high phase, and the write,
// if any, lands at the falling edge. Phases:
//   1. write every word with random data and read all words back;
//   2. 400 random cycles mixing writes, inhibited cycles (w = 0 with fresh
//      din on the bus, which must change nothing) and overwrites of words
//      already holding other data; after every cycle all 8 words are read
//      back through the output multiplexers, so a write that leaks into
//      another row is caught;
//   3. timing: dout of the addressed word must still show the old value while
//      clk is high and the new value 1 unit after the falling edge;
//   4. bus changes during the high phase: addr, din and w take random values
//      while clk is high and settle only 1 unit before the falling edge; only
//      the final values may be written (the master latches are transparent
//      while clk is high, so earlier values must be overwritten or dropped).
// Each mechanism (write, inhibited write, overwrite, read of every address,
// falling-edge update, bus change during the high phase) is counted and must
// occur at least once.
module pprram_tb;
  localparam int AW = 3;
  localparam int DW = 4;
  localparam int WORDS = 2**AW;

  logic          clk = 1'b0, w = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] din = '0, dout;
  logic [DW-1:0] model [WORDS];

  int checks = 0, failures = 0;
  int n_write = 0, n_inhibit = 0, n_overwrite = 0, n_edge = 0, n_late = 0;
  int n_read [WORDS];

  pprram dut (.clk, .w, .addr, .din, .dout);

  initial begin
    #200000;
    failures++;
    $display("pprram_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock cycle with the given bus values; starts and ends with clk low
  task automatic cycle(input logic we, input logic [AW-1:0] a, input logic [DW-1:0] d);
    w = we; addr = a; din = d;
    #1 clk = 1'b1;
    #4 clk = 1'b0;
    if (we) model[a] = d;
    #1;
    w = 1'b0;
    #4;
  endtask

  task automatic read_all();
    for (int a = 0; a < WORDS; a++) begin
      addr = AW'(a);
      #1;
      checks++;
      n_read[a]++;
      if (dout !== model[a]) begin
        failures++;
        $display("FAIL read addr=%0d got %h exp %h at %0t", a, dout, model[a], $time);
      end
    end
  endtask

  initial begin
    foreach (n_read[i]) n_read[i] = 0;

    // 1. fill
    for (int a = 0; a < WORDS; a++) begin
      cycle(1'b1, AW'(a), DW'($urandom));
      n_write++;
    end
    read_all();

    // 2. random traffic
    for (int t = 0; t < 400; t++) begin
      logic [AW-1:0] a;
      logic [DW-1:0] d;
      logic          we;
      a  = AW'($urandom);
      d  = DW'($urandom);
      we = ($urandom % 3) != 0;
      if (we) begin
        n_write++;
        if (d != model[a]) n_overwrite++;
      end else begin
        n_inhibit++;
      end
      cycle(we, a, d);
      read_all();
    end

    // 3. output timing around the falling edge
    for (int t = 0; t < 20; t++) begin
      logic [AW-1:0] a;
      logic [DW-1:0] d, old;
      a = AW'($urandom);
      old = model[a];
      d = ~old;                       // always a visible change
      w = 1'b1; addr = a; din = d;
      #1 clk = 1'b1;
      #2;
      checks++;
      if (dout !== old) begin
        failures++;
        $display("FAIL dout changed before the falling edge at %0t", $time);
      end
      #2 clk = 1'b0;
      model[a] = d;
      #1;
      checks++;
      if (dout !== d) begin
        failures++;
        $display("FAIL dout not updated after the falling edge at %0t", $time);
      end else begin
        n_edge++;
      end
      n_write++;
      n_overwrite++;
      w = 1'b0;
      #4;
    end
    read_all();

    // 4. bus changes while clk is high
    for (int t = 0; t < 100; t++) begin
      logic [AW-1:0] a;
      logic [DW-1:0] d;
      logic          we;
      #1 clk = 1'b1;
      for (int k = 0; k < 3; k++) begin
        w = 1'($urandom); addr = AW'($urandom); din = DW'($urandom);
        #1;
      end
      a  = AW'($urandom);
      d  = DW'($urandom);
      we = 1'($urandom);
      w = we; addr = a; din = d;
      #1 clk = 1'b0;
      if (we) begin
        model[a] = d;
        n_write++;
      end else begin
        n_inhibit++;
      end
      n_late++;
      #1 w = 1'b0;
      #3;
      read_all();
    end

    $display("writes=%0d inhibited=%0d overwrites=%0d edge_updates=%0d late_bus=%0d",
             n_write, n_inhibit, n_overwrite, n_edge, n_late);
    checks++;
    if (n_write == 0 || n_inhibit == 0 || n_overwrite == 0 || n_edge == 0 ||
        n_late == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    for (int a = 0; a < WORDS; a++) begin
      checks++;
      if (n_read[a] == 0) begin
        failures++;
        $display("FAIL address %0d never read", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
