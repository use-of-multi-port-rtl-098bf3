// Random-access memory with two independent write ports and NREAD read ports.
//
// A word is WIDTH one-bit slices. Each slice is the eight-cell-style write
// circuit: a column of DEPTH wr_cell bits and, for each write port, its own
// wr_decoder, so that every decoder output drives exactly one cell. The
// cell's write-control logic takes its bit from whichever port selects the
// row. Each read port is an rd_mux tree over the same cells. This is the
// memory organisation proposed for programmable devices: decoders from
// demultiplexer cells, write control plus flip-flop per bit, read multiplexers
// added in tandem for extra read ports.
//
// Rules and timing: a write (weN high) lands at the rising clock edge; reads
// are combinational and see the new value from the next cycle. The two ports
// must not write the same row in the same cycle; if they do, the cells store
// wdata0 | wdata1 and an assertion reports the collision.
// The word width and the reset to zero are choices of this design.
module mp_ram #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREAD = 3,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        we0,
  input  logic [AW-1:0]               waddr0,
  input  logic [WIDTH-1:0]            wdata0,
  input  logic                        we1,
  input  logic [AW-1:0]               waddr1,
  input  logic [WIDTH-1:0]            wdata1,
  input  logic [NREAD-1:0][AW-1:0]    raddr,
  output logic [NREAD-1:0][WIDTH-1:0] rdata
);
  logic [DEPTH-1:0][WIDTH-1:0]  cells;

  for (genvar b = 0; b < WIDTH; b++) begin : g_slice
    logic [DEPTH-1:0] sel0, sel1;

    wr_decoder #(.DEPTH(DEPTH)) u_dec0 (.addr(waddr0), .en(we0), .sel(sel0));
    wr_decoder #(.DEPTH(DEPTH)) u_dec1 (.addr(waddr1), .en(we1), .sel(sel1));

    for (genvar r = 0; r < DEPTH; r++) begin : g_row
      wr_cell u_cell (
        .clk  (clk),
        .rst_n(rst_n),
        .s0   (sel0[r]),
        .s1   (sel1[r]),
        .d0   (wdata0[b]),
        .d1   (wdata1[b]),
        .q    (cells[r][b])
      );
    end
  end

  for (genvar p = 0; p < NREAD; p++) begin : g_rd
    rd_mux #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_rd (
      .words(cells),
      .addr (raddr[p]),
      .rdata(rdata[p])
    );
  end

  // Both ports writing the same row is outside the memory's contract.
  a_no_row_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(we0 && we1 && waddr0 == waddr1))
    else $error("mp_ram: both write ports address row %0d", waddr0);
endmodule
