// addsub16 - the single 16-bit adder-subtractor of the computation
// processor.
//
// Every lattice filter ends with an adder (low band) and a subtractor (high
// band) joining its two branches; one shared unit does all of them. Operand
// A is held in a register loaded from the bus (`lda`); operand B comes
// straight from its connection. The operation (A+B, A-B or B-A) is computed
// and registered, so a result started in cycle c is on the output from cycle
// c+1. A held A lets both the sum and the difference of one pair be formed
// in two consecutive cycles. The single shared 16-bit unit follows the
// published design; the A register, the reverse subtraction and the
// wrap-around (no saturation) are this design's choices.
module addsub16
  import sbc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   lda,
  input  as_op_e op,
  input  word_t  a_in,
  input  word_t  b_in,
  output word_t  dout
);
  word_t a;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a    <= '0;
      dout <= '0;
    end else if (en) begin
      if (lda) a <= a_in;
      unique case (op)
        AS_ADD:  dout <= a + b_in;
        AS_SUB:  dout <= a - b_in;
        AS_RSUB: dout <= b_in - a;
        default: ;
      endcase
    end
  end
endmodule
