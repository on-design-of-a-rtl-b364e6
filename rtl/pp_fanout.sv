// pp_fanout: copies one signal onto COPIES lines with a chain of F2G gates,
// the design's replacement for fan-out in a reversible circuit.
//
// Each F2G is fed (x, 0, 0) and returns (x, x, x): P carries x on to the next
// gate and Q, R are two copies. COPIES/2 gates therefore give COPIES copies
// and leave one spare P at the end of the chain (the single garbage output).
// For a RAM with 2^n rows this is 2^(n-1) gates per copied signal, as the
// design counts. COPIES must be even (an odd request is rounded up inside
// and the extra copy dropped). Purely combinational.
module pp_fanout #(
  parameter int unsigned COPIES = 8
) (
  input  logic              in,
  output logic [COPIES-1:0] out
);
  localparam int unsigned NG = (COPIES + 1) / 2;

  logic [NG:0]     chain;
  logic [2*NG-1:0] copies;
  assign chain[0] = in;

  for (genvar g = 0; g < NG; g++) begin : g_f2g
    f2g_gate u_f2g (
      .a(chain[g]), .b(1'b0), .c(1'b0),
      .p(chain[g+1]), .q(copies[2*g]), .r(copies[2*g+1])
    );
  end

  assign out = copies[COPIES-1:0];
endmodule
