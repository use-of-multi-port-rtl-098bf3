// Write-address decoder built by cascading mux_demux4 cells as demultiplexers.
//
// The root cell takes the two most significant address bits (the address is
// zero-padded to an even width) and the port's write enable on its CS/EN
// input; each of its outputs drives the input of a cell one level down, which
// decodes the next two bits, and so on. Every leaf output drives exactly one
// row select. Cells whose outputs no row uses are not built. sel is one-hot
// with the addressed row, or all zero when en is low.
// Decoding by cascaded demultiplexers follows the published structure; two
// bits per level and the root-on-MSB ordering are choices of this design.
// Purely combinational.
module wr_decoder #(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [AW-1:0]    addr,
  input  logic             en,
  output logic [DEPTH-1:0] sel
);
  localparam int unsigned L  = (AW + 1) / 2;     // levels of 2-bit cells
  localparam int unsigned NW = 4 ** L;           // leaf outputs of a full tree

  logic [2*L-1:0] paddr;
  logic [NW-1:0]  lvl [L+1];                     // inputs of each level

  always_comb begin
    paddr           = '0;
    paddr[AW-1:0]   = addr;
  end

  assign lvl[0] = NW'(1);

  for (genvar k = 0; k < L; k++) begin : g_lvl
    // cells needed at level k (root k = 0)
    localparam int unsigned SPAN = 4 ** (L - k);
    localparam int unsigned NK   = (DEPTH + SPAN - 1) / SPAN;
    for (genvar j = 0; j < NK; j++) begin : g_cell
      mux_demux4 u_cell (
        .demux    (1'b1),
        .s        (paddr[2*(L-1-k) +: 2]),
        .en       ((k == 0) ? en : 1'b1),
        .mux_in   (4'b0),
        .mux_out  (),
        .demux_in (lvl[k][j]),
        .demux_out(lvl[k+1][4*j +: 4])
      );
    end
    if (4 * NK < NW) begin : g_pad
      assign lvl[k+1][NW-1:4*NK] = '0;
    end
  end

  assign sel = lvl[L][DEPTH-1:0];
endmodule
