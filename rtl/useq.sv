// useq - microprogram sequencer shared by both processors.
//
// It holds the program counter and a stack of LEVELS hardware loops, each
// with a start address, a last-body address and a remaining iteration count.
// A LOOP instruction pushes a new level whose body runs from the next address
// to the given last address; whenever the instruction at the top level's last
// address completes, the sequencer branches back to the start without a
// spare cycle until the count is exhausted, then pops the level. Nested loops
// therefore cost nothing per iteration; two levels must not share a last
// address. JUMP, HALT and RETI complete the set.
//
// One instruction is issued per cycle. When `stall` is high (a FIFO or the
// video port cannot serve the instruction) nothing advances and the datapath
// must not act. Interrupts: when `irq_valid` is high, the sequencer is not
// already in an interrupt routine and is running, the instruction at the PC
// is not issued; instead the PC is saved, the PC jumps to `irq_vec`,
// `irq_ack` pulses and `in_isr` rises. RETI restores the PC. The loop stack
// is not saved, so a routine must not use loops.
//
// The four loop levels, the hardware loop counters and the interrupt support
// follow the published design; the zero-overhead form, the encoding and the
// single-level interrupt entry are this design's choices. `start` (while
// halted or after reset) begins execution at address 0.
module useq
  import sbc_pkg::*;
#(
  parameter int LEVELS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  instr_t          instr,     // instruction at pc
  input  logic            stall,     // datapath cannot serve instr this cycle
  input  logic            irq_valid,
  input  logic [PC_W-1:0] irq_vec,
  output logic            irq_ack,
  output logic [PC_W-1:0] pc,
  output logic            issue,     // instr executes this cycle (EXEC/CONF)
  output logic            running,
  output logic            in_isr,
  output logic [$clog2(LEVELS):0] depth
);
  typedef struct packed {
    logic [PC_W-1:0] start;
    logic [PC_W-1:0] last;
    logic [7:0]      count;   // iterations still to run after the current one
  } loop_t;

  loop_t lstack [LEVELS];
  logic [PC_W-1:0] epc;

  seq_op_e op;
  assign op = seq_op_e'(instr[23:21]);

  logic take_irq, advance;
  assign take_irq = running && irq_valid && !in_isr;
  assign advance  = running && !take_irq && !stall;
  assign issue    = advance && (op == OP_EXEC || op == OP_CONF);
  assign irq_ack  = take_irq;

  loop_t top;
  logic  at_end;
  always_comb begin
    top    = (depth != 0) ? lstack[depth-1] : '0;
    at_end = (depth != 0) && (pc == top.last);
  end

  // Next PC after a straight-line instruction at pc (loop-back included).
  logic [PC_W-1:0] pc_seq;
  always_comb begin
    pc_seq = pc + 1'b1;
    if (at_end && top.count != 0) pc_seq = top.start;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      in_isr  <= 1'b0;
      depth   <= '0;
      epc     <= '0;
      for (int i = 0; i < LEVELS; i++) lstack[i] <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1;
        pc      <= '0;
        depth   <= '0;
        in_isr  <= 1'b0;
      end
    end else if (take_irq) begin
      epc    <= pc;
      pc     <= irq_vec;
      in_isr <= 1'b1;
    end else if (advance) begin
      // count down / pop the innermost loop when its last instruction ends
      if (at_end && op != OP_LOOP) begin
        if (top.count != 0) lstack[depth-1].count <= top.count - 1'b1;
        else                depth <= depth - 1'b1;
      end
      unique case (op)
        OP_LOOP: begin
          lstack[depth[$clog2(LEVELS)-1:0]].start <= pc + 1'b1;
          lstack[depth[$clog2(LEVELS)-1:0]].last  <= instr[7:0];
          lstack[depth[$clog2(LEVELS)-1:0]].count <= (instr[15:8] == 0) ? 8'd0 : instr[15:8] - 1'b1;
          depth <= depth + 1'b1;
          pc    <= pc + 1'b1;
        end
        OP_JUMP: pc <= instr[7:0];
        OP_RETI: begin
          pc     <= epc;
          in_isr <= 1'b0;
        end
        OP_HALT: running <= 1'b0;
        default: pc <= pc_seq;
      endcase
    end
  end

  a_loop_depth: assert property (@(posedge clk) disable iff (!rst_n)
                  !(advance && op == OP_LOOP && int'(depth) == LEVELS));
  a_loop_last:  assert property (@(posedge clk) disable iff (!rst_n)
                  !(advance && op == OP_LOOP && at_end));
endmodule
