// pprram: 2^ADDR_W x DATA_W parity preserving reversible random access
// memory. Every gate in it (F2G, FRG, NFT, PH3) preserves the parity of its
// inputs, so a single fault inside a gate shows up as a parity mismatch
// between a gate's inputs and outputs.
//
// Structure (one row per decoder output, one column per data bit):
//   * pp_decoder turns addr into 2^ADDR_W one-hot row lines.
//   * pp_fanout copies the write-enable w once per row (2^(ADDR_W-1) F2Gs).
//   * one NFT gate per row, fed (0, row line, w copy), gives the row write
//     enable row_line & w on its R output.
//   * pp_fanout copies every data-in bit once per row.
//   * a 2^ADDR_W x DATA_W array of pp_mem_cell. Within a row the clock and the
//     row write enable enter the first cell and are passed from cell to cell
//     through the cells' clk_o / w_o outputs; the last column's outputs are
//     the unused garbage lines.
//   * DATA_W copies of pp_mux, one per bit, select the addressed row's cell
//     outputs. The multiplexers share the address by passing it from one to
//     the next through their sel_o outputs.
// Interface and timing: write by holding addr, din and w = 1 while clk is high;
// the cells of the addressed row take din at the falling edge of clk. With
// w = 0 nothing changes. Reading is combinational: dout = mem[addr], valid
// once addr is stable and updated right after a falling edge that writes the
// addressed row. Cells are not reset.
// Design choices where the structure leaves a detail open: the clock reaches
// each row's first cell by plain wiring (no copy gates are counted for it),
// the address bit order (msb into the decoder's first F2G level, lsb on the
// multiplexers' first level), and the default size 8 x 4, as no particular
// size is singled out.
module pprram #(
  parameter int unsigned ADDR_W = 3,
  parameter int unsigned DATA_W = 4
) (
  input  logic              clk,
  input  logic              w,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  localparam int unsigned ROWS = 2**ADDR_W;

  logic [ROWS-1:0]   row_line;
  logic [ROWS-1:0]   w_copy;
  logic [ROWS-1:0]   row_we;
  logic [ROWS-1:0]   din_copy [DATA_W];   // din_copy[bit][row]
  logic [DATA_W-1:0] cell_q   [ROWS];     // cell_q[row][bit]
  logic [ROWS-1:0]   bit_col  [DATA_W];   // cell_q transposed, mux inputs

  pp_decoder #(.N(ADDR_W)) u_dec (.in(addr), .out(row_line));

  pp_fanout #(.COPIES(ROWS)) u_w_copy (.in(w), .out(w_copy));

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic nft_p, nft_q;
    logic [DATA_W:0] clk_chain;
    logic [DATA_W:0] we_chain;

    nft_gate u_and (
      .a(1'b0), .b(row_line[r]), .c(w_copy[r]),
      .p(nft_p), .q(nft_q), .r(row_we[r])
    );

    assign clk_chain[0] = clk;
    assign we_chain[0]  = row_we[r];

    for (genvar b = 0; b < DATA_W; b++) begin : g_col
      pp_mem_cell u_cell (
        .d(din_copy[b][r]), .clk(clk_chain[b]), .w(we_chain[b]),
        .q(cell_q[r][b]), .clk_o(clk_chain[b+1]), .w_o(we_chain[b+1])
      );
      assign bit_col[b][r] = cell_q[r][b];
    end
  end

  logic [ADDR_W-1:0] sel_chain [DATA_W+1];
  assign sel_chain[0] = addr;

  for (genvar b = 0; b < DATA_W; b++) begin : g_bit
    pp_fanout #(.COPIES(ROWS)) u_d_copy (.in(din[b]), .out(din_copy[b]));

    pp_mux #(.M(ADDR_W)) u_mux (
      .in(bit_col[b]), .sel(sel_chain[b]),
      .out(dout[b]), .sel_o(sel_chain[b+1])
    );
  end
endmodule
