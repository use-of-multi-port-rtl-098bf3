// Reprogrammable 4-to-1 multiplexer / 1-to-4 demultiplexer cell.
//
// This is the general-purpose cell from which both the write-address decoders
// and the read multiplexers of the two-write-port memory are built. A single
// configuration bit chooses its personality:
//   demux = 0 : 4-to-1 multiplexer, mux_out = mux_in[s]
//   demux = 1 : 1-to-4 demultiplexer, demux_out[s] = demux_in & en, the three
//               unselected outputs are driven low.
// In silicon the cell is a pass-transistor tree whose paths conduct both ways,
// so one set of wires serves both directions. A two-state RTL model cannot
// share wires that way, so each direction has its own ports here; the outputs
// of the inactive direction are held at 0. The grounding of unselected outputs
// and the CS/EN gate on the demultiplexer driver follow the cell as published;
// the separate port sets and the input ordering (s == i picks input i) are
// choices of this model. Purely combinational.
module mux_demux4 (
  input  logic       demux,      // configuration: 1 = demultiplexer
  input  logic [1:0] s,          // select {s1, s0}
  input  logic       en,         // CS/EN of the demultiplexer driver
  input  logic [3:0] mux_in,
  output logic       mux_out,
  input  logic       demux_in,
  output logic [3:0] demux_out
);
  always_comb begin
    mux_out   = 1'b0;
    demux_out = '0;
    if (demux) demux_out[s] = demux_in & en;
    else       mux_out      = mux_in[s];
  end
endmodule
