// End-to-end testbench for sa_top: solves y'' + 3xy' + 3y = 0 by the
// differential-equation loop on the three A-blocks.
// For several sets of initial values and step sizes it loads the variables
// into the local memories over the external port, starts the loop, waits for
// done and reads x, y and u back. The results and the iteration count are
// compared with a fixed-point reference written here; busy must last exactly
// seven cycles per iteration. It also counts, over all runs, each mechanism
// the schedule depends on and fails if one never happened: two writes into
// one local memory in a step, a bus value used as an operand in the step it
// arrives, a product put on the bus in the step it finishes, a variable read
// from memory onto the bus, three reads from one memory in a step, four
// accesses to one memory in a step, a repeated iteration, a loop exit,
// external loads and reads.
module tb_sa_top;
  import sa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, start, busy, done, ext_we, ext_re;
  logic [1:0]  ext_blk;
  addr_t       ext_addr;
  word_t       ext_wdata, bus;
  logic [15:0] iter;

  sa_top dut (.*);

  int n_dual = 0, n_busop = 0, n_mulbus = 0, n_membus = 0, n_3rd = 0, n_4acc = 0;
  int n_repeat = 0, n_exit = 0, n_load = 0, n_read = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference fixed-point arithmetic (same word format as the design).
  function automatic word_t fmul(word_t p, word_t q);
    longint r;
    r = longint'($signed(p)) * longint'($signed(q));
    return word_t'(r >>> FRAC);
  endfunction

  // Mechanism counters, sampled while the loop runs.
  always @(posedge clk) begin
    if (busy) begin
      for (int b = 0; b < NBLK; b++) begin
        automatic blk_ctl_t c = dut.ctl[b];
        automatic int reads = 0, writes = 0;
        if (c.we && c.rw == RW_WRITE) n_dual++;
        if (c.opb == OPB_BUS && (c.op == OP_ADD || c.op == OP_SUB || c.op == OP_MUL1)) n_busop++;
        if (c.out == OUT_MUL && c.op == OP_MUL2) n_mulbus++;
        if (c.rw == RW_READ) n_membus++;
        if (c.op inside {OP_ADD, OP_SUB, OP_LT, OP_MUL1}) reads += (c.opb == OPB_MEM) ? 2 : 1;
        if (c.rw == RW_READ) reads++;
        if (c.rw == RW_WRITE) writes++;
        if (c.we) writes++;
        if (reads == 3) n_3rd++;
        if (reads + writes == 4) n_4acc++;
      end
    end
  end

  task automatic ext_write(input int blk, input addr_t a, input word_t v);
    ext_we = 1; ext_blk = 2'(blk); ext_addr = a; ext_wdata = v;
    @(negedge clk);
    ext_we = 0;
    n_load++;
  endtask

  task automatic ext_read(input int blk, input addr_t a, output word_t v);
    ext_re = 1; ext_blk = 2'(blk); ext_addr = a;
    #1 v = bus;
    @(negedge clk);
    ext_re = 0;
    n_read++;
  endtask

  task automatic run(input word_t x0, input word_t y0, input word_t u0, input word_t dx, input word_t a);
    word_t x, y, u, v0, v1, v2, v3, v4, v5, v6, three, gx, gy, gu, gx2, gdx;
    int    n_ref, cyc;
    bit    c;
    three = word_t'(3 << FRAC);
    // reference
    x = x0; y = y0; u = u0; n_ref = 0;
    do begin
      v0 = fmul(dx, u); v1 = fmul(three, x); v2 = fmul(v0, v1); v3 = fmul(three, y);
      v5 = fmul(dx, v3); v6 = fmul(u, dx);
      v4 = u - v2; x = x + dx; c = $signed(x) < $signed(a);
      u = v4 - v5; y = y + v6;
      n_ref++;
    end while (c && n_ref < 1000);
    // load
    ext_write(0, A0_DX, dx);
    ext_write(1, A1_DX, dx); ext_write(1, A1_X, x0); ext_write(1, A1_Y, y0); ext_write(1, A1_THREE, three);
    ext_write(2, A2_DX, dx); ext_write(2, A2_U, u0); ext_write(2, A2_A, a);
    // run
    start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (busy && cyc < 7 * n_ref + 70) begin
      @(negedge clk);
      cyc++;
    end
    check(!busy, "loop ended");
    if (busy) begin   // stuck: reset to return to idle for the next run
      rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    end
    check(cyc == 7 * n_ref, $sformatf("busy %0d cycles, expected %0d", cyc, 7 * n_ref));
    check(iter == 16'(n_ref), $sformatf("iterations %0d, expected %0d", iter, n_ref));
    if (n_ref > 1) n_repeat++;
    n_exit++;
    ext_read(1, A1_X, gx); ext_read(1, A1_Y, gy); ext_read(2, A2_U, gu);
    ext_read(2, A2_X, gx2); ext_read(0, A0_DX, gdx);
    check(gx == x && gx2 == x, $sformatf("x: %h %h expected %h", gx, gx2, x));
    check(gy == y, $sformatf("y: %h expected %h", gy, y));
    check(gu == u, $sformatf("u: %h expected %h", gu, u));
    check(gdx == dx, "dx preserved");
    $display("run: x0=%h y0=%h u0=%h dx=%h a=%h -> %0d iterations, x=%h y=%h u=%h",
             x0, y0, u0, dx, a, n_ref, gx, gy, gu);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; start = 0; ext_we = 0; ext_re = 0; ext_blk = 0; ext_addr = 0; ext_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // x0 = 0, y0 = 1, u0 = 0, dx = 1/16, a = 1: sixteen iterations
    run(16'h0000, 16'h0100, 16'h0000, 16'h0010, 16'h0100);
    // loop bound already passed: a single iteration
    run(16'h0200, 16'h0080, 16'h0040, 16'h0008, 16'h0100);
    // negative start, larger step
    run(16'hFF00, 16'h0180, 16'hFFC0, 16'h0020, 16'h0080);
    // random cases
    for (int i = 0; i < 4; i++)
      run(word_t'($urandom_range(255)), word_t'($urandom_range(511)) - 16'd256,
          word_t'($urandom_range(511)) - 16'd256, word_t'($urandom_range(32, 4)),
          word_t'($urandom_range(767, 256)));
    check(n_dual > 0,   "two writes into one memory in a step");
    check(n_busop > 0,  "bus value used as operand on arrival");
    check(n_mulbus > 0, "product sent to the bus as it finishes");
    check(n_membus > 0, "variable read from memory onto the bus");
    check(n_3rd > 0,    "three reads from one memory in a step");
    check(n_4acc > 0,   "four accesses to one memory in a step");
    check(n_repeat > 0, "loop repeated");
    check(n_exit > 0,   "loop exited");
    check(n_load > 0 && n_read > 0, "external loads and reads");
    $display("mechanisms: dual-write %0d, bus operand %0d, product-to-bus %0d, memory-to-bus %0d, 3-read %0d, 4-access %0d, repeat %0d, exit %0d, loads %0d, reads %0d",
             n_dual, n_busop, n_mulbus, n_membus, n_3rd, n_4acc, n_repeat, n_exit, n_load, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
