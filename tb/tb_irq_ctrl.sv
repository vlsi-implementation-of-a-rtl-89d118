// tb_irq_ctrl - checks masking, pending flags, priority of line 0 over line
// 1, vector addresses and clearing by acknowledge.
module tb_irq_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] req = 0, mask_d = 0, pending;
  logic mask_we = 0, ack = 0, irq_valid;
  logic [7:0] irq_vec;
  int checks = 0, failures = 0;

  irq_ctrl dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); req = 2'b11;
    @(negedge clk); req = 0;
    check(pending == 2'b11, "both pending");
    check(!irq_valid, "masked off");
    @(negedge clk); mask_we = 1; mask_d = 2'b10;
    @(negedge clk); mask_we = 0;
    check(irq_valid && irq_vec == 8'hF0, "line 1 alone when line 0 masked");
    @(negedge clk); mask_we = 1; mask_d = 2'b11;
    @(negedge clk); mask_we = 0;
    check(irq_valid && irq_vec == 8'hE0, "line 0 has priority");
    ack = 1;
    @(negedge clk); ack = 0;
    check(pending == 2'b10, "ack clears line 0 only");
    check(irq_valid && irq_vec == 8'hF0, "then line 1");
    ack = 1;
    @(negedge clk); ack = 0;
    check(pending == 2'b00 && !irq_valid, "all served");
    // a request arriving during acknowledge of the other line is kept
    req = 2'b01;
    @(negedge clk); req = 2'b10; ack = 1;
    @(negedge clk); req = 0; ack = 0;
    check(pending == 2'b10, "new line 1 request kept while line 0 acked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
