// tb_tp_format - checks the staging register (whole-word load, half writes
// and reads), the video input register with its ready handshake and
// interrupt pulse, and the registered video output.
module tb_tp_format;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mem_load = 0, half_we = 0, half = 0, vin_valid = 0, vin_ready, vin_take = 0;
  logic vin_full, vin_irq, vout_we = 0, vout_valid;
  logic [31:0] mem_rdata = 0, staging;
  word_t half_wdata = 0, half_rdata, vin_data = 0, vin_word, vout_wdata = 0, vout_data;
  int checks = 0, failures = 0;

  tp_format dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] m;
    repeat (2) @(posedge clk); rst_n = 1;
    m = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      mem_load = ($urandom % 3) == 0; half_we = 1'($urandom); half = 1'($urandom);
      mem_rdata = $urandom; half_wdata = 16'($urandom);
      if (mem_load) m = mem_rdata;
      else if (half_we) begin
        if (half) m[31:16] = half_wdata; else m[15:0] = half_wdata;
      end
      @(negedge clk);
      mem_load = 0; half_we = 0;
      check(staging == m, "staging register");
      half = 1'($urandom);
      #1 check(half_rdata == (half ? m[31:16] : m[15:0]), "half read");
    end
    // video input: accept, refuse while full, release on take
    for (int n = 0; n < 50; n++) begin
      word_t a, b;
      a = 16'($urandom); b = 16'($urandom);
      @(negedge clk); check(vin_ready, "ready when empty");
      vin_valid = 1; vin_data = a;
      @(negedge clk); vin_valid = 0;
      check(vin_full && vin_word == a && vin_irq, "word captured with interrupt pulse");
      vin_valid = 1; vin_data = b;
      @(negedge clk); vin_valid = 0;
      check(!vin_ready && vin_word == a && !vin_irq, "second word refused while full");
      vin_take = 1;
      @(negedge clk); vin_take = 0;
      check(!vin_full, "released by take");
      vout_we = 1; vout_wdata = a;
      @(negedge clk); vout_we = 0;
      check(vout_valid && vout_data == a, "video output");
      @(negedge clk);
      check(!vout_valid, "video output valid is one pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
