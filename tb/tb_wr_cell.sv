// Self-checking testbench for wr_cell: random row selects and data bits,
// including both selects at once, are applied for many cycles and the stored
// bit is compared with a reference: hold when no select, else s0.d0 + s1.d1.
module tb_wr_cell;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, s0, s1, d0, d1, q;
  logic ref_q;
  int   both = 0;

  wr_cell dut (.*);

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
    rst_n = 1'b0; {s0, s1, d0, d1} = '0; ref_q = 1'b0;
    repeat (2) @(negedge clk);
    check(q == 1'b0, "reset value");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      {s0, s1, d0, d1} = 4'($urandom);
      if (s0 && s1) both++;
      @(posedge clk);
      if (s0 | s1) ref_q = (s0 & d0) | (s1 & d1);
      @(negedge clk);
      check(q == ref_q, $sformatf("s0=%0d s1=%0d d0=%0d d1=%0d q=%0d exp=%0d", s0, s1, d0, d1, q, ref_q));
    end
    check(both > 0, "both selects exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
