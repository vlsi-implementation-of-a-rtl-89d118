// tb_addr_unit - loads pointers and strides, checks address = rf[ra]+rf[rb]
// and the write-back pointer walk against a model register file.
module tb_addr_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] ra = 0, rb = 0, ld_reg = 0;
  logic wb = 0, ld = 0;
  logic [15:0] ld_val = 0, addr;
  logic [15:0] m [16];
  int checks = 0, failures = 0;

  addr_unit dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (m[i]) m[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); ld = 1; ld_reg = 4'(i); ld_val = 16'($urandom);
      m[i] = ld_val;
    end
    @(negedge clk); ld = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ra = 4'($urandom); rb = 4'($urandom); wb = 1'($urandom);
      #1 check(addr == 16'(m[ra] + m[rb]), $sformatf("addr %h expected %h", addr, 16'(m[ra] + m[rb])));
      @(posedge clk);
      if (wb) m[ra] = 16'(m[ra] + m[rb]);
    end
    // a pointer walk with stride 3 from 0xFFFE wraps through 1, 4, 7
    @(negedge clk); wb = 0; ld = 1; ld_reg = 0; ld_val = 16'hFFFE;
    @(negedge clk); ld_reg = 1; ld_val = 16'd3;
    @(negedge clk); ld = 0; ra = 0; rb = 1; wb = 1;
    for (int k = 0; k < 3; k++) begin
      #1 check(addr == 16'(16'hFFFE + 3 * (k + 1)), "pointer walk");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
