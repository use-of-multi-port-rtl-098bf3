// Architectural block (A-block): a functional unit and its local memory.
//
// Every time step the block carries out the control word ctl:
//  - the FU reads operand a from read port 0 and operand b from read port 1
//    or straight from the global bus (a value arriving this step can be used
//    at once);
//  - the FU result can be stored through the write port;
//  - the read/write port either stores the bus value or reads a variable
//    that the block offers on bus_out;
//  - bus_out can instead carry a product finishing this step, so a result
//    leaves the block in the step it is produced.
// Because a result and an incoming bus value can be stored in the same step,
// the local memory needs two write ports; that is what mp_ram provides.
// Timing: all reads and the bus are combinational within a step; stores and
// the multiplier operand registers update at the rising clock edge.
module ablock
  import sa_pkg::*;
#(
  parameter ops_t OPS = OPS_ALL
) (
  input  logic     clk,
  input  logic     rst_n,
  input  blk_ctl_t ctl,
  input  word_t    bus_in,
  output word_t    bus_out,
  output logic     lt
);
  word_t rd0, rd1, rw_rd, opb, y, prod;

  local_mem #(.DEPTH(DEPTH), .WIDTH(DW)) u_mem (
    .clk  (clk),
    .rst_n(rst_n),
    .ra0  (ctl.ra0),
    .rd0  (rd0),
    .ra1  (ctl.ra1),
    .rd1  (rd1),
    .we   (ctl.we),
    .wa   (ctl.wa),
    .wd   (y),
    .rw_we(ctl.rw == RW_WRITE),
    .rw_a (ctl.rwa),
    .rw_wd(bus_in),
    .rw_rd(rw_rd)
  );

  assign opb = (ctl.opb == OPB_BUS) ? bus_in : rd1;

  fu #(.OPS(OPS)) u_fu (
    .clk  (clk),
    .rst_n(rst_n),
    .op   (ctl.op),
    .a    (rd0),
    .b    (opb),
    .y    (y),
    .prod (prod),
    .lt   (lt)
  );

  assign bus_out = (ctl.out == OUT_MUL) ? prod : rw_rd;
endmodule
