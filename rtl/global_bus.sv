// Global buses joining the A-blocks (and an external source).
//
// All data moving between blocks goes over these buses, which is what gives
// the architecture its regular layout. Each of the NBUS buses carries, within
// the same cycle, the value of the source the controller selects for it
// (src_sel), or 0 when it is idle (src_vld low). The buses are built as
// multiplexers rather than tri-state lines; that, the idle value and the
// default of one bus (one transfer per time step in the schedule) are choices
// of this design. Purely combinational.
module global_bus #(
  parameter int unsigned NSRC  = 4,
  parameter int unsigned NBUS  = 1,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned SW   = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic [NSRC-1:0][WIDTH-1:0] src_data,
  input  logic [NBUS-1:0][SW-1:0]    src_sel,
  input  logic [NBUS-1:0]            src_vld,
  output logic [NBUS-1:0][WIDTH-1:0] bus
);
  always_comb begin
    for (int i = 0; i < NBUS; i++) begin
      bus[i] = '0;
      if (src_vld[i] && 32'(src_sel[i]) < NSRC) bus[i] = src_data[src_sel[i]];
    end
  end
endmodule
