// Self-checking testbench for wr_decoder: every address with the enable high
// and low, for the 8-row default and for 5-, 32- and 64-row decoders (odd and
// even address widths, partly used trees); sel must be one-hot on the address
// or all zero.
module tb_wr_decoder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [5:0]  addr;
  logic        en;
  logic [7:0]  sel8;
  logic [4:0]  sel5;
  logic [31:0] sel32;
  logic [63:0] sel64;

  wr_decoder             d8  (.addr(addr[2:0]), .en(en), .sel(sel8));
  wr_decoder #(.DEPTH(5))  d5  (.addr(addr[2:0]), .en(en), .sel(sel5));
  wr_decoder #(.DEPTH(32)) d32 (.addr(addr[4:0]), .en(en), .sel(sel32));
  wr_decoder #(.DEPTH(64)) d64 (.addr(addr[5:0]), .en(en), .sel(sel64));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++)
      for (int e = 0; e < 2; e++) begin
        addr = 6'(a); en = e[0];
        @(negedge clk);
        check(sel64 == (e ? 64'(1) << a : 64'd0), $sformatf("64 rows a=%0d e=%0d", a, e));
        if (a < 32) check(sel32 == (e ? 32'(1) << a : 32'd0), $sformatf("32 rows a=%0d e=%0d", a, e));
        if (a < 8)  check(sel8  == (e ? 8'(1)  << a : 8'd0),  $sformatf("8 rows a=%0d e=%0d sel=%b", a, e, sel8));
        if (a < 5)  check(sel5  == (e ? 5'(1)  << a : 5'd0),  $sformatf("5 rows a=%0d e=%0d", a, e));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
