// tb_addsub16 - random operand/operation sequences against a model of the
// A register and the registered result (A+B, A-B, B-A, hold), with en gating.
module tb_addsub16;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, lda = 0;
  as_op_e op = AS_NONE;
  word_t a_in = 0, b_in = 0, dout;
  int checks = 0, failures = 0;

  addsub16 dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t ma, mo;
    ma = 0; mo = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0; lda = 1'($urandom); op = as_op_e'($urandom % 4);
      a_in = 16'($urandom); b_in = 16'($urandom);
      if (en) begin
        unique case (op)
          AS_ADD:  mo = ma + b_in;
          AS_SUB:  mo = ma - b_in;
          AS_RSUB: mo = b_in - ma;
          default: ;
        endcase
        if (lda) ma = a_in;
      end
      @(negedge clk);
      check(dout == mo, $sformatf("op %s result %h expected %h", op.name(), dout, mo));
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
