// pp_mux_tb: random data on 2-, 4-, 8- and 16-input multiplexers, every select
// value, checking out = in[sel] and that the select bus leaves unchanged on
// sel_o.
module pp_mux_tb;
  int checks = 0, failures = 0;

  logic [1:0]  in1;  logic [0:0] sel1, so1;  logic o1;
  logic [3:0]  in2;  logic [1:0] sel2, so2;  logic o2;
  logic [7:0]  in3;  logic [2:0] sel3, so3;  logic o3;
  logic [15:0] in4;  logic [3:0] sel4, so4;  logic o4;

  pp_mux #(.M(1)) dut1 (.in(in1), .sel(sel1), .out(o1), .sel_o(so1));
  pp_mux #(.M(2)) dut2 (.in(in2), .sel(sel2), .out(o2), .sel_o(so2));
  pp_mux           dut3 (.in(in3), .sel(sel3), .out(o3), .sel_o(so3));
  pp_mux #(.M(4)) dut4 (.in(in4), .sel(sel4), .out(o4), .sel_o(so4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      logic [15:0] data;
      data = 16'($urandom);
      in1 = data[1:0]; in2 = data[3:0]; in3 = data[7:0]; in4 = data;
      for (int v = 0; v < 16; v++) begin
        sel1 = 1'(v); sel2 = 2'(v); sel3 = 3'(v); sel4 = 4'(v);
        #1;
        checks += 4;
        if (o2 !== data[v % 4]) begin failures++; $display("FAIL M=2 sel=%0d", v % 4); end
        if (o1 !== data[v % 2]) begin failures++; $display("FAIL M=1 sel=%0d", v % 2); end
        if (o3 !== data[v % 8]) begin failures++; $display("FAIL M=3 sel=%0d", v % 8); end
        if (o4 !== data[v])     begin failures++; $display("FAIL M=4 sel=%0d", v); end
        checks++;
        if (so3 !== sel3 || so4 !== sel4 || so1 !== sel1 || so2 !== sel2) begin
          failures++;
          $display("FAIL sel_o");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
