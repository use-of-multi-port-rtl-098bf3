// Shared types, constants and microcode of the structured architecture.
//
// The architecture is a row of architectural blocks (A-blocks), each a
// functional unit with a local two-write-port memory, joined only by a global
// bus and driven by a central controller. This package holds the word format,
// the control word each A-block receives every time step, and the microcode
// that runs the differential-equation loop (y'' + 3xy' + 3y = 0, stepped by
// dx) on three A-blocks in seven time steps, one bus transfer per step.
// The seven-step schedule, its binding of operations and transfers to blocks
// and the two-step multiply follow the published schedule; the word format,
// control-word layout and variable addresses are choices of this design.
package sa_pkg;

  // Word format: signed two's complement, FRAC fraction bits.
  localparam int unsigned DW    = 16;
  localparam int unsigned FRAC  = 8;
  // Local memory: DEPTH words per A-block.
  localparam int unsigned DEPTH = 8;
  localparam int unsigned AW    = $clog2(DEPTH);
  // Three A-blocks; bus sources are the blocks plus one external port.
  localparam int unsigned NBLK    = 3;
  localparam int unsigned NSRC    = NBLK + 1;
  localparam int unsigned SW      = $clog2(NSRC);
  localparam int unsigned EXT_SRC = NBLK;
  // Time steps of one loop iteration.
  localparam int unsigned NSTEP = 7;

  typedef logic [DW-1:0] word_t;
  typedef logic [AW-1:0] addr_t;

  // OP_MUL1 registers the operands, OP_MUL2 delivers their product one step
  // later: a multiplication occupies two time steps.
  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,
    OP_ADD  = 3'd1,
    OP_SUB  = 3'd2,
    OP_LT   = 3'd3,
    OP_MUL1 = 3'd4,
    OP_MUL2 = 3'd5
  } fu_op_e;

  // Operation sets a functional unit implements, one bit per fu_op_e value.
  typedef logic [5:0] ops_t;
  localparam ops_t OPS_MUL = ops_t'((1 << OP_MUL1) | (1 << OP_MUL2) | 1);
  localparam ops_t OPS_ADD = ops_t'((1 << OP_ADD) | 1);
  localparam ops_t OPS_SUB = ops_t'((1 << OP_SUB) | 1);
  localparam ops_t OPS_LT  = ops_t'((1 << OP_LT) | 1);
  localparam ops_t OPS_ALL = OPS_MUL | OPS_ADD | OPS_SUB | OPS_LT;

  typedef enum logic [1:0] {RW_IDLE, RW_READ, RW_WRITE} rw_op_e;   // read/write port
  typedef enum logic       {OPB_MEM, OPB_BUS}           opb_sel_e; // FU operand b
  typedef enum logic       {OUT_MEM, OUT_MUL}           out_sel_e; // value offered to the bus

  // Control word of one A-block for one time step.
  typedef struct packed {
    fu_op_e   op;     // functional-unit operation
    addr_t    ra0;    // operand a address (read port 0)
    addr_t    ra1;    // operand b address (read port 1)
    opb_sel_e opb;    // operand b from memory or from the bus
    logic     we;     // store the FU result ...
    addr_t    wa;     // ... at this address (write port)
    rw_op_e   rw;     // read/write port: idle, read to bus, write from bus
    addr_t    rwa;    // its address
    out_sel_e out;    // bus value: memory read or finishing product
    logic     lt_en;  // this step's comparison decides the loop
  } blk_ctl_t;

  typedef struct packed {
    logic          vld;
    logic [SW-1:0] src;
  } bus_ctl_t;

  localparam blk_ctl_t CTL_NOP = '{op: OP_NOP, ra0: '0, ra1: '0, opb: OPB_MEM,
                                   we: 1'b0, wa: '0, rw: RW_IDLE, rwa: '0,
                                   out: OUT_MEM, lt_en: 1'b0};

  // Variable placement. Block 0 holds dx, block 1 holds x, y, dx and the
  // constant 3, block 2 holds u, dx and the bound a at the start of a loop.
  localparam addr_t A0_DX = 0, A0_U = 1, A0_V0 = 2, A0_V1 = 3, A0_V6 = 4;
  localparam addr_t A1_DX = 0, A1_X = 1, A1_Y = 2, A1_THREE = 3, A1_V3 = 4;
  localparam addr_t A2_DX = 0, A2_U = 1, A2_X = 2, A2_A = 3, A2_V2 = 4,
                    A2_V4 = 5, A2_V5 = 6;

  // Operation sets bound to the blocks by the schedule.
  localparam ops_t BLK_OPS [NBLK] = '{OPS_MUL, OPS_MUL | OPS_ADD,
                                      OPS_ADD | OPS_SUB | OPS_LT};

  // Microcode: control word of block blk in time step step (0..6).
  //   step  block 0            block 1             block 2            bus
  //   0     v0=dx*u (start)    v1=3*x (start)      u -> bus           u:  2->0
  //         store u from bus
  //   1     v0 done, store;    v1 done -> bus                         v1: 1->0
  //         store v1 from bus
  //   2     v2=v0*v1 (start)   v3=3*y (start)      x=dx+x (x on bus)  x:  1->2
  //                            x -> bus
  //   3     v2 done -> bus     v3 done, store      store v2; x<a      v2: 0->2
  //   4     v6=u*dx (start)    v5=dx*v3 (start)    x -> bus           x:  2->1
  //                            store x from bus
  //   5     v6 done, store     v5 done -> bus      v4=u-v2, store     v5: 1->2
  //                                                store v5 from bus
  //   6     v6 -> bus          y=y+v6 (v6 on bus)  u=v4-v5            v6: 0->1
  function automatic blk_ctl_t diffeq_ctl(input int unsigned step, input int unsigned blk);
    blk_ctl_t c;
    c = CTL_NOP;
    case (step)
      0: case (blk)
           0: begin c.op = OP_MUL1; c.ra0 = A0_DX; c.opb = OPB_BUS;
                    c.rw = RW_WRITE; c.rwa = A0_U; end
           1: begin c.op = OP_MUL1; c.ra0 = A1_THREE; c.ra1 = A1_X; end
           2: begin c.rw = RW_READ; c.rwa = A2_U; c.out = OUT_MEM; end
           default: ;
         endcase
      1: case (blk)
           0: begin c.op = OP_MUL2; c.we = 1'b1; c.wa = A0_V0;
                    c.rw = RW_WRITE; c.rwa = A0_V1; end
           1: begin c.op = OP_MUL2; c.out = OUT_MUL; end
           default: ;
         endcase
      2: case (blk)
           0: begin c.op = OP_MUL1; c.ra0 = A0_V0; c.ra1 = A0_V1; end
           1: begin c.op = OP_MUL1; c.ra0 = A1_THREE; c.ra1 = A1_Y;
                    c.rw = RW_READ; c.rwa = A1_X; c.out = OUT_MEM; end
           2: begin c.op = OP_ADD; c.ra0 = A2_DX; c.opb = OPB_BUS;
                    c.we = 1'b1; c.wa = A2_X; end
           default: ;
         endcase
      3: case (blk)
           0: begin c.op = OP_MUL2; c.out = OUT_MUL; end
           1: begin c.op = OP_MUL2; c.we = 1'b1; c.wa = A1_V3; end
           2: begin c.op = OP_LT; c.ra0 = A2_X; c.ra1 = A2_A; c.lt_en = 1'b1;
                    c.rw = RW_WRITE; c.rwa = A2_V2; end
           default: ;
         endcase
      4: case (blk)
           0: begin c.op = OP_MUL1; c.ra0 = A0_U; c.ra1 = A0_DX; end
           1: begin c.op = OP_MUL1; c.ra0 = A1_DX; c.ra1 = A1_V3;
                    c.rw = RW_WRITE; c.rwa = A1_X; end
           2: begin c.rw = RW_READ; c.rwa = A2_X; c.out = OUT_MEM; end
           default: ;
         endcase
      5: case (blk)
           0: begin c.op = OP_MUL2; c.we = 1'b1; c.wa = A0_V6; end
           1: begin c.op = OP_MUL2; c.out = OUT_MUL; end
           2: begin c.op = OP_SUB; c.ra0 = A2_U; c.ra1 = A2_V2; c.we = 1'b1; c.wa = A2_V4;
                    c.rw = RW_WRITE; c.rwa = A2_V5; end
           default: ;
         endcase
      6: case (blk)
           0: begin c.rw = RW_READ; c.rwa = A0_V6; c.out = OUT_MEM; end
           1: begin c.op = OP_ADD; c.ra0 = A1_Y; c.opb = OPB_BUS; c.we = 1'b1; c.wa = A1_Y; end
           2: begin c.op = OP_SUB; c.ra0 = A2_V4; c.ra1 = A2_V5; c.we = 1'b1; c.wa = A2_U; end
           default: ;
         endcase
      default: ;
    endcase
    return c;
  endfunction

  // Bus source of each time step (one transfer per step).
  function automatic bus_ctl_t diffeq_bus(input int unsigned step);
    bus_ctl_t b;
    b.vld = 1'b1;
    case (step)
      0:       b.src = SW'(2);
      1, 2, 5: b.src = SW'(1);
      3, 6:    b.src = SW'(0);
      4:       b.src = SW'(2);
      default: begin b.vld = 1'b0; b.src = '0; end
    endcase
    return b;
  endfunction

endpackage
