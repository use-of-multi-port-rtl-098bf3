// Self-checking testbench for mp_ram: random cycles in which either, both or
// neither write port writes (always to different rows when both write), while
// three read ports read random rows. A reference array gives the expected
// read data every cycle; writes must show from the next cycle on. Cycles with
// two simultaneous writes are counted and must occur. An 8-cell, 1-bit
// instance (the smallest configuration of the structure) runs alongside.
module tb_mp_ram;
  localparam int DEPTH = 8, WIDTH = 16, NREAD = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                         rst_n, we0, we1;
  logic [2:0]                   waddr0, waddr1;
  logic [WIDTH-1:0]             wdata0, wdata1;
  logic [NREAD-1:0][2:0]        raddr;
  logic [NREAD-1:0][WIDTH-1:0]  rdata;
  logic [WIDTH-1:0]             model [DEPTH];
  int                           dual = 0;

  mp_ram dut (.*);

  // The published eight-cell, one-bit configuration, driven alongside.
  logic [NREAD-1:0][0:0] rdata_b;
  mp_ram #(.DEPTH(8), .WIDTH(1)) dut_bit (
    .clk, .rst_n, .we0, .waddr0, .wdata0(wdata0[0]), .we1, .waddr1, .wdata1(wdata1[0]),
    .raddr, .rdata(rdata_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we0 = 0; we1 = 0; waddr0 = 0; waddr1 = 0; wdata0 = 0; wdata1 = 0; raddr = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      we0 = 1'($urandom); we1 = 1'($urandom);
      waddr0 = 3'($urandom); waddr1 = 3'($urandom);
      if (we0 && we1 && waddr1 == waddr0) waddr1 = waddr0 + 3'd1;
      wdata0 = 16'($urandom); wdata1 = 16'($urandom);
      for (int p = 0; p < NREAD; p++) raddr[p] = 3'($urandom);
      #1;
      for (int p = 0; p < NREAD; p++)
        check(rdata[p] == model[raddr[p]],
              $sformatf("cycle %0d port %0d addr %0d got %h exp %h", i, p, raddr[p], rdata[p], model[raddr[p]]));
      for (int p = 0; p < NREAD; p++)
        check(rdata_b[p][0] == model[raddr[p]][0], $sformatf("1-bit memory port %0d addr %0d", p, raddr[p]));
      if (we0 && we1) dual++;
      @(posedge clk);
      if (we0) model[waddr0] = wdata0;
      if (we1) model[waddr1] = wdata1;
      @(negedge clk);
    end
    check(dual > 100, $sformatf("dual writes exercised (%0d)", dual));
    $display("dual-write cycles: %0d", dual);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
