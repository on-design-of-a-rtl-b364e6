// pprram_traffic: reusable random-traffic checker for one pprram instance of
// a given size. It owns its clock (period 10, high first), fills every word,
// then runs CYCLES random cycles of writes and inhibited writes (w = 0), and
// after each cycle reads a random address and the address just used,
// comparing dout with an array model. When finished it raises done and
// reports its counts on the outputs.
module pprram_traffic #(
  parameter int AW = 2,
  parameter int DW = 2,
  parameter int CYCLES = 200
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   writes,
  output int   inhibits
);
  logic          clk = 1'b0, w = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] din = '0, dout;
  logic [DW-1:0] model [2**AW];

  pprram #(.ADDR_W(AW), .DATA_W(DW)) dut (.clk, .w, .addr, .din, .dout);

  task automatic cycle(input logic we, input logic [AW-1:0] a, input logic [DW-1:0] d);
    w = we; addr = a; din = d;
    #1 clk = 1'b1;
    #4 clk = 1'b0;
    if (we) model[a] = d;
    #1 w = 1'b0;
    #4;
  endtask

  task automatic read_check(input logic [AW-1:0] a);
    addr = a;
    #1;
    checks++;
    if (dout !== model[a]) begin
      failures++;
      $display("FAIL %0dx%0d addr=%0d got %h exp %h", 2**AW, DW, a, dout, model[a]);
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; writes = 0; inhibits = 0;
    for (int a = 0; a < 2**AW; a++) begin
      cycle(1'b1, AW'(a), DW'($urandom));
      writes++;
    end
    for (int a = 0; a < 2**AW; a++) read_check(AW'(a));
    for (int t = 0; t < CYCLES; t++) begin
      logic [AW-1:0] a;
      logic          we;
      a  = AW'($urandom);
      we = $urandom % 2 == 1;
      if (we) writes++; else inhibits++;
      cycle(we, a, DW'($urandom));
      read_check(a);
      read_check(AW'($urandom));
    end
    done = 1'b1;
  end
endmodule
