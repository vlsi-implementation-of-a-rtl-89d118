// scale_mult - the single 10x16 scaling multiplier of the computation
// processor.
//
// The lattice filters end with a scaling multiplication on each output
// branch (lambda*(1+rho_N) on the low band, lambda*(1-rho_N) on the high
// band). Moving the vertical filter's scalers behind the horizontal filter and
// merging them leaves one multiplication per output, all done by this unit.
// It multiplies a 16-bit operand from the bus by one of SCL_BANK 10-bit
// coefficients (Q2.8, this design's choice), rounds, shifts back by 8 bits,
// saturates to 16 bits and registers the result: a result loaded in cycle c
// is on the output from cycle c+1. The 10x16 size follows the published
// design; the coefficient bank, format, rounding and saturation are this
// design's own.
module scale_mult
  import sbc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             ld,
  input  logic [1:0]       coef_sel,
  input  word_t            din,
  input  logic             coef_we,
  input  logic [1:0]       coef_idx,
  input  logic [SCL_W-1:0] coef_val,
  output word_t            dout
);
  logic signed [SCL_W-1:0] coef [SCL_BANK];
  logic signed [SCL_W+DATA_W-1:0] prod, rnd;
  word_t sat;

  always_comb begin
    prod = $signed(din) * coef[coef_sel];
    rnd  = (prod + (1 <<< (SCL_FRAC-1))) >>> SCL_FRAC;
    if (rnd > 32767)       sat = 16'h7FFF;
    else if (rnd < -32768) sat = 16'h8000;
    else                   sat = rnd[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SCL_BANK; i++) coef[i] <= '0;
      dout <= '0;
    end else begin
      if (coef_we) coef[coef_idx] <= coef_val;
      if (en && ld) dout <= sat;
    end
  end
endmodule
