// tb_prog_ram - writes random words through the host port at both program RAM
// sizes (256 and 160 words) and reads them back; writes beyond the depth must
// not alias.
module tb_prog_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [7:0] waddr = 0, raddr = 0, raddr2 = 0;
  logic [23:0] wdata = 0, rdata, rdata2;
  logic [23:0] m [256];
  int checks = 0, failures = 0;

  prog_ram #(.DEPTH(256)) tp_ram (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  prog_ram #(.DEPTH(160)) cp_ram (.clk, .we, .waddr, .wdata, .raddr(raddr2), .rdata(rdata2));

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 24'($urandom); m[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); raddr2 = 8'(i);
      #1;
      check(rdata == m[i], $sformatf("TP RAM word %0d", i));
      if (i < 160) check(rdata2 == m[i], $sformatf("CP RAM word %0d", i));
      else         check(rdata2 == 24'd0, "CP RAM beyond depth reads zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
