// Self-checking testbench for local_mem: random cycles using the two read
// ports, the write port and the read/write port (as a read or as a write)
// together, never writing one address twice in a cycle. Read data is compared
// with a reference array; cycles with four accesses (two reads, two writes)
// and with three reads are counted and must occur.
module tb_local_mem;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, we, rw_we;
  logic [2:0]  ra0, ra1, wa, rw_a;
  logic [15:0] rd0, rd1, wd, rw_wd, rw_rd;
  logic [15:0] model [8];
  int          four = 0, three_rd = 0;

  local_mem dut (.*);

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
    rst_n = 1'b0; we = 0; rw_we = 0; ra0 = 0; ra1 = 0; wa = 0; rw_a = 0; wd = 0; rw_wd = 0;
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      ra0 = 3'($urandom); ra1 = 3'($urandom); wa = 3'($urandom); rw_a = 3'($urandom);
      we = 1'($urandom); rw_we = 1'($urandom);
      if (we && rw_we && wa == rw_a) wa = rw_a + 3'd1;
      wd = 16'($urandom); rw_wd = 16'($urandom);
      #1;
      check(rd0 == model[ra0], $sformatf("rd0 a=%0d got %h exp %h", ra0, rd0, model[ra0]));
      check(rd1 == model[ra1], $sformatf("rd1 a=%0d got %h exp %h", ra1, rd1, model[ra1]));
      if (!rw_we) begin
        check(rw_rd == model[rw_a], $sformatf("rw read a=%0d got %h exp %h", rw_a, rw_rd, model[rw_a]));
        three_rd++;
      end
      if (we && rw_we) four++;
      @(posedge clk);
      if (we)    model[wa]   = wd;
      if (rw_we) model[rw_a] = rw_wd;
      @(negedge clk);
    end
    check(four > 100 && three_rd > 100, $sformatf("access mixes exercised (%0d, %0d)", four, three_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
