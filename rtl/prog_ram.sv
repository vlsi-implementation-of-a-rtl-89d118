// prog_ram - microprogram RAM of one processor.
//
// The external host writes the microprogram through a synchronous write port
// at boot time; the sequencer reads the instruction at its program counter
// through an asynchronous read port, so an instruction is fetched and
// executed in the same cycle. The published chip has a 256 x 24 RAM in the
// transfer processor and a 160 x 24 RAM in the computation processor; the
// read timing and the host port protocol are this design's own choice.
// Addresses at or above DEPTH are ignored on write and read as zero (an
// EXEC with no action).
module prog_ram #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 24,
  parameter int AW    = 8
) (
  input  logic             clk,
  input  logic             we,      // host write strobe
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,   // program counter
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;

  always_comb
    rdata = (int'(raddr) < DEPTH) ? mem[raddr] : '0;
endmodule
