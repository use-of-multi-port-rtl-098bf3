// Self-checking testbench for fu: random operands for add, subtract and
// less-than (result in the same step) and for two-step multiplications (the
// product must appear on y and prod in the step after OP_MUL1, computed by a
// reference fixed-point multiply). A unit built with only the add operation
// is checked too.
module tb_fu;
  import sa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, lt, lt_a;
  fu_op_e op, op_a;
  word_t  a, b, y, prod, y_a, prod_a;

  fu                  dut   (.clk, .rst_n, .op, .a, .b, .y, .prod, .lt);
  fu #(.OPS(OPS_ADD)) dut_a (.clk, .rst_n, .op(op_a), .a, .b, .y(y_a), .prod(prod_a), .lt(lt_a));

  function automatic word_t ref_mul(word_t x, word_t z);
    longint p;
    p = longint'($signed(x)) * longint'($signed(z));
    return word_t'(p >>> FRAC);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t ea, eb;
    rst_n = 1'b0; op = OP_NOP; op_a = OP_NOP; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      a = word_t'($urandom); b = word_t'($urandom);
      if (i % 7 == 0) b = a;
      case ($urandom_range(3))
        0: begin op = OP_ADD; #1; check(y == word_t'(a + b), $sformatf("add %h+%h=%h", a, b, y)); end
        1: begin op = OP_SUB; #1; check(y == word_t'(a - b), $sformatf("sub %h-%h=%h", a, b, y)); end
        2: begin op = OP_LT;  #1;
                 check(lt == ($signed(a) < $signed(b)) && y == word_t'(lt), $sformatf("lt %h<%h", a, b)); end
        default: begin
          op = OP_MUL1; ea = a; eb = b;
          @(negedge clk);
          op = OP_MUL2; a = word_t'($urandom); b = word_t'($urandom);
          #1;
          check(y == ref_mul(ea, eb) && prod == ref_mul(ea, eb),
                $sformatf("mul %h*%h got %h exp %h", ea, eb, y, ref_mul(ea, eb)));
        end
      endcase
      op_a = OP_ADD;
      #1;
      check(y_a == word_t'(a + b), "add-only unit adds");
      @(negedge clk);
      op = OP_NOP; op_a = OP_NOP;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
