// Self-checking testbench for controller. External writes and reads in the
// idle state must give the addressed block a read/write-port command and the
// bus the right source. A run is started with the comparison input of block
// 2 held high for N-1 iterations and low in the last: the controller must
// stay busy for exactly 7*N cycles, issue in every step the control word of
// the schedule (checked against a table written out here, not the package
// function), count N iterations and pulse done once.
module tb_controller;
  import sa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n, start, ext_we, ext_re, busy, done;
  logic [1:0]          ext_blk;
  addr_t               ext_addr;
  logic [NBLK-1:0]     lt;
  blk_ctl_t [NBLK-1:0] ctl;
  bus_ctl_t            bus_ctl;
  logic [15:0]         iter;

  controller dut (.*);

  // Expected per step: FU op of each block and the bus source.
  fu_op_e exp_op [7][3] = '{
    '{OP_MUL1, OP_MUL1, OP_NOP},
    '{OP_MUL2, OP_MUL2, OP_NOP},
    '{OP_MUL1, OP_MUL1, OP_ADD},
    '{OP_MUL2, OP_MUL2, OP_LT},
    '{OP_MUL1, OP_MUL1, OP_NOP},
    '{OP_MUL2, OP_MUL2, OP_SUB},
    '{OP_NOP,  OP_ADD,  OP_SUB}};
  int exp_src [7] = '{2, 1, 1, 0, 2, 1, 0};
  // Expected dual-write steps (write port and read/write port both store).
  bit exp_dual [7][3] = '{'{0,0,0}, '{1,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,0}, '{0,0,1}, '{0,0,0}};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, cyc, dones;
    rst_n = 1'b0; start = 0; ext_we = 0; ext_re = 0; ext_blk = 0; ext_addr = 0; lt = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // idle external access
    for (int b = 0; b < 3; b++) begin
      ext_we = 1; ext_blk = 2'(b); ext_addr = addr_t'(b + 3); #1;
      check(ctl[b].rw == RW_WRITE && ctl[b].rwa == addr_t'(b + 3) && bus_ctl.vld && bus_ctl.src == SW'(EXT_SRC),
            "external write command");
      for (int o = 0; o < 3; o++) if (o != b) check(ctl[o] == CTL_NOP, "other blocks idle");
      ext_we = 0; ext_re = 1; #1;
      check(ctl[b].rw == RW_READ && ctl[b].out == OUT_MEM && bus_ctl.src == SW'(b), "external read command");
      ext_re = 0;
      @(negedge clk);
    end
    for (n = 1; n <= 4; n++) begin
      start = 1; @(negedge clk); start = 0;
      cyc = 0; dones = 0;
      for (int it = 0; it < n; it++) begin
        for (int s = 0; s < 7; s++) begin
          lt[2] = (it < n - 1);
          #1;
          check(busy, "busy while running");
          for (int b = 0; b < 3; b++) begin
            check(ctl[b].op == exp_op[s][b], $sformatf("n=%0d it=%0d step %0d block %0d op %0d", n, it, s, b, ctl[b].op));
            check((ctl[b].we && ctl[b].rw == RW_WRITE) == exp_dual[s][b], $sformatf("dual write step %0d block %0d", s, b));
          end
          check(bus_ctl.vld && 32'(bus_ctl.src) == exp_src[s], $sformatf("bus source step %0d", s));
          check((ctl[2].lt_en == 1'b1) == (s == 3), "comparison step");
          @(negedge clk);
          cyc++;
          if (done) dones++;
        end
      end
      check(!busy && dones == 1, $sformatf("done after %0d cycles, busy=%0d dones=%0d", cyc, busy, dones));
      check(cyc == 7 * n && iter == 16'(n), $sformatf("iterations %0d exp %0d", iter, n));
      @(negedge clk);
      check(!done, "done is one pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
