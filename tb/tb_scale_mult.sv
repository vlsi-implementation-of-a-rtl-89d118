// tb_scale_mult - loads the four scaling coefficients and checks rounded,
// saturated Q2.8 products, the one-cycle latency, and that the result holds
// while ld or en is low.
module tb_scale_mult;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, ld = 0, coef_we = 0;
  logic [1:0] coef_sel = 0, coef_idx = 0;
  logic [9:0] coef_val = 0;
  word_t din = 0, dout;
  int coef [4];
  int checks = 0, failures = 0;

  scale_mult dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int expect_of(int x, int c);
    longint p = (longint'(x) * c + 128) >>> 8;
    return (p > 32767) ? 32767 : (p < -32768) ? -32768 : int'(p);
  endfunction

  initial begin
    int prev, x, e;
    repeat (2) @(posedge clk); rst_n = 1;
    coef = '{181, 362, -256, 511};
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); coef_we = 1; coef_idx = 2'(i); coef_val = 10'(coef[i]);
    end
    @(negedge clk); coef_we = 0;
    prev = 0;
    for (int n = 0; n < 1000; n++) begin
      bit go;
      x = (n < 4) ? ((n % 2) ? 32767 : -32768) : int'(signed'(16'($urandom)));
      coef_sel = 2'($urandom);
      go = ($urandom % 4) != 0;
      en = go ? 1'b1 : 1'($urandom);
      ld = go ? 1'b1 : !en;
      din = 16'(x);
      e = (en && ld) ? expect_of(x, coef[coef_sel]) : prev;
      @(negedge clk);
      check(int'(signed'(dout)) == e, $sformatf("%0d * coef%0d -> %0d expected %0d",
            x, coef_sel, int'(signed'(dout)), e));
      prev = e;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
