// One storage bit of the two-write-port memory with its write-control logic.
//
// Each bit of the memory sees the row selects of both write ports (s0, s1)
// and the corresponding data bits (d0, d1). The next value is s0.d0 + s1.d1,
// formed by a 4-to-1 multiplexer (a mux_demux4 in multiplexer mode) whose
// select is {d1 & s1, s0} and whose inputs are 0, d0, 1, 1; the flip-flop is
// written when s0 | s1. So the port that selects the row supplies the bit,
// and if both ports select the row the stored bit is d0 | d1. This is the
// published cell; the synchronous-enable flip-flop on a common clock and the
// asynchronous reset are choices of this design.
//
// Timing: q takes the new value at the rising clock edge of the cycle in which
// s0 or s1 is high; otherwise it holds.
module wr_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic s0,
  input  logic s1,
  input  logic d0,
  input  logic d1,
  output logic q
);
  logic d_next;

  mux_demux4 u_mux (
    .demux    (1'b0),
    .s        ({d1 & s1, s0}),
    .en       (1'b0),
    .mux_in   ({1'b1, 1'b1, d0, 1'b0}),
    .mux_out  (d_next),
    .demux_in (1'b0),
    .demux_out()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= 1'b0;
    else if (s0 | s1)  q <= d_next;
  end
endmodule
