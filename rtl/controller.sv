// Controller of the structured architecture.
//
// A microcoded sequencer. After start it steps through the NSTEP time steps
// of the loop body, giving every A-block its control word and the global bus
// its source for each step (the microcode is diffeq_ctl / diffeq_bus in
// sa_pkg). In the step whose control word sets lt_en the comparison result
// of that block is latched; at the end of the last step the body is repeated
// if the latched result is 1, otherwise the controller returns to idle and
// pulses done. busy is high for exactly NSTEP cycles per iteration.
// When idle it serves external accesses: ext_we stores the external bus
// source into word ext_addr of block ext_blk through that block's read/write
// port; ext_re puts that word on the bus. ext_we wins if both are set.
// Looping while the comparison holds (do-while form) and the external access
// scheme are choices of this design.
module controller
  import sa_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 ext_we,
  input  logic                 ext_re,
  input  logic [1:0]           ext_blk,
  input  addr_t                ext_addr,
  input  logic [NBLK-1:0]      lt,
  output blk_ctl_t [NBLK-1:0]  ctl,
  output bus_ctl_t             bus_ctl,
  output logic                 busy,
  output logic                 done,
  output logic [15:0]          iter
);
  typedef enum logic {S_IDLE, S_RUN} state_e;

  localparam int unsigned STW = $clog2(NSTEP);

  state_e          state;
  logic [STW-1:0]  step;
  logic            again;       // comparison latched in this iteration
  logic            again_now;   // comparison taken this step, if any
  logic [NBLK-1:0] lt_en;

  always_comb begin
    for (int b = 0; b < NBLK; b++) begin
      ctl[b] = CTL_NOP;
    end
    bus_ctl = '{vld: 1'b0, src: '0};
    if (state == S_RUN) begin
      for (int b = 0; b < NBLK; b++) begin
        ctl[b] = diffeq_ctl(32'(step), b);
      end
      bus_ctl = diffeq_bus(32'(step));
    end else if (32'(ext_blk) < NBLK) begin
      if (ext_we) begin
        ctl[ext_blk].rw  = RW_WRITE;
        ctl[ext_blk].rwa = ext_addr;
        bus_ctl          = '{vld: 1'b1, src: SW'(EXT_SRC)};
      end else if (ext_re) begin
        ctl[ext_blk].rw  = RW_READ;
        ctl[ext_blk].rwa = ext_addr;
        ctl[ext_blk].out = OUT_MEM;
        bus_ctl          = '{vld: 1'b1, src: SW'(ext_blk)};
      end
    end
  end

  always_comb begin
    for (int b = 0; b < NBLK; b++) lt_en[b] = ctl[b].lt_en;
  end

  assign again_now = (|lt_en) ? |(lt & lt_en) : again;
  assign busy      = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      again <= 1'b0;
      done  <= 1'b0;
      iter  <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          step  <= '0;
          again <= 1'b0;
          iter  <= '0;
        end
        S_RUN: begin
          again <= again_now;
          if (32'(step) == NSTEP - 1) begin
            step <= '0;
            iter <= iter + 16'd1;
            if (!again_now) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end else begin
            step <= step + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
