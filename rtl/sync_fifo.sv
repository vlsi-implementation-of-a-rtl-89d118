// sync_fifo - one of the two 16-bit x 16-word FIFOs between the transfer
// processor and the computation processor.
//
// The FIFOs decouple the two independently sequenced processors: a processor
// that reads an empty FIFO or writes a full one is stalled by its own
// controller, which is how the two synchronise. This is a single-clock
// circular buffer with a read pointer, a write pointer and an occupancy
// count; the head word is visible on rdata while not empty (first-word
// fall-through), a push and a pop may happen in the same cycle. Width and
// depth follow the published design; the fall-through read and the
// simultaneous push/pop are this design's choice. A push to a full FIFO or
// a pop from an empty one is ignored and flagged by an assertion.
module sync_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int PW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0] rp, wp;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[PW:0]);
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0;
      wp <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (int'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
