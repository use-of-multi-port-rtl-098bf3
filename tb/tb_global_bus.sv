// Self-checking testbench for global_bus with four sources and two buses:
// random source selections and values; each bus must carry the selected
// source's value, or 0 when idle.
module tb_global_bus;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0][15:0] src_data;
  logic [1:0][1:0]  src_sel;
  logic [1:0]       src_vld;
  logic [1:0][15:0] bus;

  global_bus #(.NSRC(4), .NBUS(2), .WIDTH(16)) dut (.*);

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
    for (int i = 0; i < 1000; i++) begin
      for (int s = 0; s < 4; s++) src_data[s] = 16'($urandom);
      src_sel = 4'($urandom); src_vld = 2'($urandom);
      @(negedge clk);
      for (int k = 0; k < 2; k++)
        check(bus[k] == (src_vld[k] ? src_data[src_sel[k]] : 16'd0),
              $sformatf("bus %0d sel %0d vld %0d got %h", k, src_sel[k], src_vld[k], bus[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
