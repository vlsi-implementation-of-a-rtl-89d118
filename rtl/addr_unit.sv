// addr_unit - address unit of the transfer processor.
//
// A 16-word x 16-bit register file holds the pointers into the line delays
// kept in the data memory. It has three ports, one write and two reads, as
// published; the single adder forms the memory address rf[ra] + rf[rb]
// (pointer plus stride or offset). With `wb` the sum is written back into
// rf[ra], giving a pre-modified pointer walk. The microprogram can also load
// a register with an immediate (`ld`), which takes the write port. The
// address is combinational from the read addresses and is presented to the
// memory in the cycle of the access; register updates happen at the clock
// edge. Modulo addressing is left to the microprogram (this design's choice).
module addr_unit
  import sbc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        ra,
  input  logic [3:0]        rb,
  input  logic              wb,       // rf[ra] <= rf[ra] + rf[rb]
  input  logic              ld,       // rf[ld_reg] <= ld_val
  input  logic [3:0]        ld_reg,
  input  logic [ADDR_W-1:0] ld_val,
  output logic [ADDR_W-1:0] addr
);
  logic [ADDR_W-1:0] rf [RF_DEPTH];

  assign addr = rf[ra] + rf[rb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RF_DEPTH; i++) rf[i] <= '0;
    end else if (ld) begin
      rf[ld_reg] <= ld_val;
    end else if (wb) begin
      rf[ra] <= addr;
    end
  end
endmodule
