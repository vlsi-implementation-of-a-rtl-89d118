// tb_sync_fifo - random push/pop traffic against a queue model; checks the
// head word, empty/full/count flags, fill to full and drain to empty.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full;
  logic [15:0] wdata = 0, rdata;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [15:0] q[$];

  sync_fifo #(.WIDTH(16), .DEPTH(16)) dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(bit pu, bit po);
    @(negedge clk);
    push = pu && !full; pop = po && !empty; wdata = 16'($urandom);
    check(empty == (q.size() == 0), "empty flag");
    check(full == (q.size() == 16), "full flag");
    check(int'(count) == q.size(), "count");
    if (q.size() > 0) check(rdata == q[0], $sformatf("head %h expected %h", rdata, q[0]));
    @(posedge clk);
    if (pop) void'(q.pop_front());
    if (push) q.push_back(wdata);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) step(1, 0);     // fill past full
    check(q.size() == 16, "filled to 16");
    for (int i = 0; i < 20; i++) step(0, 1);     // drain past empty
    check(q.size() == 0, "drained");
    for (int i = 0; i < 2000; i++) step($urandom % 2, $urandom % 2);
    @(negedge clk); push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
