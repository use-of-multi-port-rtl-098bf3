// Self-checking testbench for rd_mux: random contents, every address, for the
// 8-word default and a 5-word, 8-bit instance; rdata must equal the
// addressed word.
module tb_rd_mux;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0][15:0] words8;
  logic [4:0][7:0]  words5;
  logic [2:0]       addr;
  logic [15:0]      rdata8;
  logic [7:0]       rdata5;

  rd_mux                       m8 (.words(words8), .addr(addr), .rdata(rdata8));
  rd_mux #(.DEPTH(5), .WIDTH(8)) m5 (.words(words5), .addr(addr), .rdata(rdata5));

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
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 8; i++) words8[i] = 16'($urandom);
      for (int i = 0; i < 5; i++) words5[i] = 8'($urandom);
      for (int a = 0; a < 8; a++) begin
        addr = 3'(a);
        @(negedge clk);
        check(rdata8 == words8[a], $sformatf("8x16 a=%0d got %h exp %h", a, rdata8, words8[a]));
        if (a < 5) check(rdata5 == words5[a], $sformatf("5x8 a=%0d got %h", a, rdata5));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
