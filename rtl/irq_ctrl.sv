// irq_ctrl - interrupt controller of the transfer processor.
//
// Two hardware interrupt lines are handled: line 0 signals that a word is
// waiting on the video input, line 1 signals the end of a video line. A
// request pulse sets a pending flag; the enable mask (written by the
// microprogram) gates it. Line 0 has priority over line 1. While a pending
// and enabled request exists, `irq_valid` is high and `irq_vec` gives the
// routine's address; the sequencer's acknowledge clears the flag of the
// request it took. The two lines and their meanings follow the published
// design; priority, vector addresses and the mask are this design's choice.
// The two vectors differ in one bit only, so the other bits of `irq_vec`
// are constant after synthesis.
module irq_ctrl
  import sbc_pkg::*;
#(
  parameter logic [PC_W-1:0] VEC0 = 8'hE0,   // data input routine
  parameter logic [PC_W-1:0] VEC1 = 8'hF0    // end of line routine
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      req,       // request pulses
  input  logic            mask_we,
  input  logic [1:0]      mask_d,
  input  logic            ack,
  output logic            irq_valid,
  output logic [PC_W-1:0] irq_vec,
  output logic [1:0]      pending
);
  logic [1:0] mask, active;
  logic       sel;        // 0: line 0 chosen, 1: line 1 chosen

  assign active    = pending & mask;
  assign irq_valid = |active;
  assign sel       = !active[0];
  assign irq_vec   = sel ? VEC1 : VEC0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      mask    <= '0;
    end else begin
      if (mask_we) mask <= mask_d;
      for (int i = 0; i < 2; i++) begin
        if (req[i])                               pending[i] <= 1'b1;
        else if (ack && irq_valid && (int'(sel) == i)) pending[i] <= 1'b0;
      end
    end
  end
endmodule
