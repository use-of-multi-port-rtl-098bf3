// Local memory of an architectural block: four access ports on one mp_ram.
//
// An operation x = y op z needs two reads and one write, and a transfer over
// the global bus needs one more read or write at the same time. The ports are:
//   ra0/rd0, ra1/rd1 : read-only ports (functional-unit operands)
//   we/wa/wd         : write-only port (functional-unit result), write port 0
//   rw_*             : read/write port (global-bus transfers); its address
//                      drives write port 1 and a third read multiplexer.
// So up to three reads and two writes happen per cycle, never more than four
// accesses. Reads are combinational, writes land at the rising clock edge.
// The write port and the read/write port must not write the same address in
// the same cycle (checked inside mp_ram).
module local_mem #(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    ra0,
  output logic [WIDTH-1:0] rd0,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd,
  input  logic             rw_we,
  input  logic [AW-1:0]    rw_a,
  input  logic [WIDTH-1:0] rw_wd,
  output logic [WIDTH-1:0] rw_rd
);
  logic [2:0][AW-1:0]    raddr;
  logic [2:0][WIDTH-1:0] rdata;

  assign raddr = {rw_a, ra1, ra0};
  assign rd0   = rdata[0];
  assign rd1   = rdata[1];
  assign rw_rd = rdata[2];

  mp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .NREAD(3)) u_ram (
    .clk   (clk),
    .rst_n (rst_n),
    .we0   (we),
    .waddr0(wa),
    .wdata0(wd),
    .we1   (rw_we),
    .waddr1(rw_a),
    .wdata1(rw_wd),
    .raddr (raddr),
    .rdata (rdata)
  );
endmodule
