// Structured architecture running the differential-equation loop.
//
// Three A-blocks, each a functional unit with a two-write-port local memory,
// exchange data only over one global bus, under a microcoded controller.
// One loop iteration takes seven clock cycles (time steps) with one bus
// transfer per step; block 0 multiplies, block 1 multiplies and adds, block 2
// adds, subtracts and compares, as bound by the schedule in sa_pkg.
//
// Use: while idle, load each block's variables with ext_we / ext_blk /
// ext_addr / ext_wdata (one word per cycle; addresses in sa_pkg), pulse
// start, wait for done, then read results with ext_re: the word appears on
// bus in the same cycle. The external bus source stands where a global
// memory would connect. iter counts completed iterations of the last run.
module sa_top
  import sa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        busy,
  output logic        done,
  input  logic        ext_we,
  input  logic        ext_re,
  input  logic [1:0]  ext_blk,
  input  addr_t       ext_addr,
  input  word_t       ext_wdata,
  output word_t       bus,
  output logic [15:0] iter
);
  blk_ctl_t [NBLK-1:0]      ctl;
  bus_ctl_t                 bus_ctl;
  logic     [NBLK-1:0]      lt;
  logic     [NSRC-1:0][DW-1:0] src_data;
  logic     [0:0][DW-1:0]   bus_v;

  controller u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .ext_we  (ext_we),
    .ext_re  (ext_re),
    .ext_blk (ext_blk),
    .ext_addr(ext_addr),
    .lt      (lt),
    .ctl     (ctl),
    .bus_ctl (bus_ctl),
    .busy    (busy),
    .done    (done),
    .iter    (iter)
  );

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    ablock #(.OPS(BLK_OPS[b])) u_blk (
      .clk    (clk),
      .rst_n  (rst_n),
      .ctl    (ctl[b]),
      .bus_in (bus),
      .bus_out(src_data[b]),
      .lt     (lt[b])
    );
  end
  assign src_data[EXT_SRC] = ext_wdata;

  global_bus #(.NSRC(NSRC), .NBUS(1), .WIDTH(DW)) u_bus (
    .src_data(src_data),
    .src_sel (bus_ctl.src),
    .src_vld (bus_ctl.vld),
    .bus     (bus_v)
  );
  assign bus = bus_v[0];
endmodule
