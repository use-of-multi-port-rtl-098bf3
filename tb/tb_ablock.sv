// Self-checking testbench for ablock. Control words are driven directly and a
// reference model of the local memory and the functional unit predicts every
// bus_out, lt and stored value. The random sequence mixes: storing bus values
// through the read/write port, reading variables to the bus, add/subtract
// with operand b taken from the bus, two-step multiplications whose product
// is stored while a bus value is stored in the same step (two writes), and
// products sent straight to the bus. Each of these must occur.
module tb_ablock;
  import sa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic     rst_n, lt;
  blk_ctl_t ctl;
  word_t    bus_in, bus_out;
  word_t    model [DEPTH];
  int       n_dual = 0, n_fwd = 0, n_mulbus = 0, n_rd = 0;

  ablock dut (.*);

  function automatic word_t ref_mul(word_t x, word_t z);
    longint p;
    p = longint'($signed(x)) * longint'($signed(z));
    return word_t'(p >>> FRAC);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step();
    @(posedge clk);
    @(negedge clk);
    ctl = CTL_NOP;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t ia, ib, ic, id;
    word_t pa, pb, bv, exp;
    rst_n = 1'b0; ctl = CTL_NOP; bus_in = '0;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill the memory from the bus
    for (int i = 0; i < DEPTH; i++) begin
      ctl.rw = RW_WRITE; ctl.rwa = addr_t'(i); bus_in = word_t'($urandom);
      model[i] = bus_in;
      step();
    end
    for (int t = 0; t < 1000; t++) begin
      ia = addr_t'($urandom); ib = addr_t'($urandom); ic = addr_t'($urandom); id = addr_t'($urandom);
      bv = word_t'($urandom);
      case ($urandom_range(4))
        0: begin // read a variable to the bus
          ctl.rw = RW_READ; ctl.rwa = ia; ctl.out = OUT_MEM; #1;
          check(bus_out == model[ia], $sformatf("read %0d got %h exp %h", ia, bus_out, model[ia]));
          n_rd++;
          step();
        end
        1: begin // add or subtract with operand b from the bus, result stored
          ctl.op = ($urandom_range(1) != 0) ? OP_ADD : OP_SUB;
          ctl.ra0 = ia; ctl.opb = OPB_BUS; bus_in = bv; ctl.we = 1'b1; ctl.wa = ic;
          exp = (ctl.op == OP_ADD) ? word_t'(model[ia] + bv) : word_t'(model[ia] - bv);
          n_fwd++;
          step();
          model[ic] = exp;
        end
        2: begin // multiply, store product and a bus value in the same step
          ctl.op = OP_MUL1; ctl.ra0 = ia; ctl.ra1 = ib;
          pa = model[ia]; pb = model[ib];
          step();
          if (id == ic) id = ic + 1'b1;
          ctl.op = OP_MUL2; ctl.we = 1'b1; ctl.wa = ic;
          ctl.rw = RW_WRITE; ctl.rwa = id; bus_in = bv;
          n_dual++;
          step();
          model[ic] = ref_mul(pa, pb);
          model[id] = bv;
        end
        3: begin // multiply, product straight to the bus
          ctl.op = OP_MUL1; ctl.ra0 = ia; ctl.opb = OPB_BUS; bus_in = bv;
          pa = model[ia]; pb = bv;
          step();
          ctl.op = OP_MUL2; ctl.out = OUT_MUL; #1;
          check(bus_out == ref_mul(pa, pb), $sformatf("product to bus got %h exp %h", bus_out, ref_mul(pa, pb)));
          n_mulbus++;
          step();
        end
        default: begin // compare
          ctl.op = OP_LT; ctl.ra0 = ia; ctl.ra1 = ib; #1;
          check(lt == ($signed(model[ia]) < $signed(model[ib])), "less-than");
          step();
        end
      endcase
      // every step: memory contents as the model says (read port 0 sweep)
      ctl.ra0 = ia; ctl.rw = RW_READ; ctl.rwa = ic; ctl.out = OUT_MEM; #1;
      check(bus_out == model[ic], $sformatf("t=%0d word %0d got %h exp %h", t, ic, bus_out, model[ic]));
      if ($urandom_range(1) != 0) begin
        ctl.rwa = id; #1;
        check(bus_out == model[id], $sformatf("t=%0d word %0d got %h exp %h", t, id, bus_out, model[id]));
      end
      ctl = CTL_NOP;
    end
    check(n_dual > 0 && n_fwd > 0 && n_mulbus > 0 && n_rd > 0, "all mechanisms exercised");
    $display("dual writes %0d, bus operands %0d, products to bus %0d, reads to bus %0d",
             n_dual, n_fwd, n_mulbus, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
