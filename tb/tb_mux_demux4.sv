// Self-checking testbench for mux_demux4: every combination of configuration,
// select, enable and data is applied in both personalities and the outputs
// are compared with the expected multiplexer / demultiplexer function.
module tb_mux_demux4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       demux, en, mux_out, demux_in;
  logic [1:0] s;
  logic [3:0] mux_in, demux_out;

  mux_demux4 dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int si = 0; si < 4; si++)
        for (int e = 0; e < 2; e++)
          for (int d = 0; d < 16; d++)
            for (int di = 0; di < 2; di++) begin
              demux = m[0]; s = si[1:0]; en = e[0]; mux_in = d[3:0]; demux_in = di[0];
              @(negedge clk);
              if (m == 0) begin
                check(mux_out == d[si], $sformatf("mux s=%0d in=%b out=%b", si, d[3:0], mux_out));
                check(demux_out == 4'b0, "demux outputs idle in mux mode");
              end else begin
                check(demux_out == ((di[0] & e[0]) ? 4'(1 << si) : 4'b0),
                      $sformatf("demux s=%0d en=%0d in=%0d out=%b", si, e, di, demux_out));
                check(mux_out == 1'b0, "mux output idle in demux mode");
              end
            end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
