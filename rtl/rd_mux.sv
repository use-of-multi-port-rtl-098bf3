// Read port of the two-write-port memory: a multiplexer tree per bit.
//
// Each bit of the read word is chosen from the DEPTH stored bits by a tree of
// mux_demux4 cells in multiplexer mode, two address bits per level, the leaves
// on the least significant bits. Further read ports are simply further trees
// on the same storage cells, which is how the memory gets several read ports
// without duplicating the storage. Leaf inputs beyond DEPTH are tied to 0.
// Reading is combinational: rdata follows addr and the cell contents within
// the same cycle.
module rd_mux #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [DEPTH-1:0][WIDTH-1:0] words,
  input  logic [AW-1:0]               addr,
  output logic [WIDTH-1:0]            rdata
);
  localparam int unsigned L  = (AW + 1) / 2;
  localparam int unsigned NW = 4 ** L;

  logic [2*L-1:0] paddr;
  always_comb begin
    paddr         = '0;
    paddr[AW-1:0] = addr;
  end

  for (genvar b = 0; b < WIDTH; b++) begin : g_bit
    logic [NW-1:0] v [L+1];           // v[0]: stored bits, v[L][0]: result

    for (genvar r = 0; r < NW; r++) begin : g_leaf
      if (r < DEPTH) begin : g_cell
        assign v[0][r] = words[r][b];
      end else begin : g_zero
        assign v[0][r] = 1'b0;
      end
    end

    for (genvar m = 0; m < L; m++) begin : g_lvl
      localparam int unsigned NM = NW / (4 ** (m + 1));
      for (genvar j = 0; j < NM; j++) begin : g_cell
        mux_demux4 u_cell (
          .demux    (1'b0),
          .s        (paddr[2*m +: 2]),
          .en       (1'b0),
          .mux_in   (v[m][4*j +: 4]),
          .mux_out  (v[m+1][j]),
          .demux_in (1'b0),
          .demux_out()
        );
      end
      assign v[m+1][NW-1:NM] = '0;
    end

    assign rdata[b] = v[L][0];
  end
endmodule
