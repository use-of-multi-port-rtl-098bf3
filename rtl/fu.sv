// Functional unit of an A-block.
//
// Executes one operation x = a op b per time step on signed fixed-point words
// (DW bits, FRAC fraction bits): add, subtract, less-than and multiply. A
// multiplication takes two time steps: OP_MUL1 registers a and b, OP_MUL2 puts
// their product (scaled back by FRAC bits, rounded toward minus infinity) on
// y and on prod. prod depends only on the registered operands, so it can be
// placed on the global bus without a combinational path from the bus back to
// itself. lt is a < b (signed), valid in every step; y is 1 or 0 for OP_LT.
// OPS lists the operations this unit implements; hardware for the others is
// not built and issuing one is an assertion error. Word format and rounding
// are choices of this design; the two-step multiply follows the published
// schedule.
module fu
  import sa_pkg::*;
#(
  parameter ops_t OPS = OPS_ALL
) (
  input  logic   clk,
  input  logic   rst_n,
  input  fu_op_e op,
  input  word_t  a,
  input  word_t  b,
  output word_t  y,
  output word_t  prod,
  output logic   lt
);
  localparam bit HAS_MUL = OPS[OP_MUL1];
  localparam bit HAS_ADD = OPS[OP_ADD];
  localparam bit HAS_SUB = OPS[OP_SUB];
  localparam bit HAS_LT  = OPS[OP_LT];

  logic mul_pending;    // an OP_MUL1 was issued in the previous step

  if (HAS_MUL) begin : g_mul
    logic signed [DW-1:0]   ma, mb;
    logic signed [2*DW-1:0] full;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ma <= '0;
        mb <= '0;
      end else if (op == OP_MUL1) begin
        ma <= a;
        mb <= b;
      end
    end
    assign full = ma * mb;
    assign prod = full[FRAC +: DW];
  end else begin : g_nomul
    assign prod = '0;
  end

  assign lt = HAS_LT && ($signed(a) < $signed(b));

  always_comb begin
    y = '0;
    case (op)
      OP_ADD:  if (HAS_ADD) y = a + b;
      OP_SUB:  if (HAS_SUB) y = a - b;
      OP_LT:   y = word_t'(lt);
      OP_MUL2: y = prod;
      default: y = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mul_pending <= 1'b0;
    else        mul_pending <= (op == OP_MUL1);
  end

  a_op_implemented: assert property (@(posedge clk) disable iff (!rst_n) OPS[op])
    else $error("fu: operation %0d not implemented by this unit", op);
  a_mul_two_steps: assert property (@(posedge clk) disable iff (!rst_n)
    op == OP_MUL2 |-> mul_pending)
    else $error("fu: OP_MUL2 without OP_MUL1 in the previous step");
endmodule
