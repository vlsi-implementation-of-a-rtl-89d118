// tb_tp_core - runs a TP microprogram that packs video input words two by two
// into memory words, reads them back and sends the halves to the CP FIFO,
// forwards words coming back from the CP to the video output (directly and
// through the staging register), and passes one video word straight to the
// CP. An end-of-line interrupt routine counts lines meanwhile. The testbench
// plays the CP side of the FIFOs (with a late start, so the TP stalls) and
// the external SRAM. Checks memory contents, FIFO and video traffic, the
// interrupt count and that stalls occurred.
module tb_tp_core;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_we = 0, start = 0, running, mem_we, mem_re, vin_valid = 0, vin_ready;
  logic eol = 0, vout_valid, cp_fin_empty, cp_fin_pop, cp_fout_push = 0, cp_fout_full;
  logic stalled;
  logic [7:0] prog_addr = 0;
  instr_t prog_wdata = 0;
  logic [15:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  word_t vin_data = 0, vout_data, cp_fin_data, cp_fout_data = 0;
  logic [31:0] sram [65536];
  int checks = 0, failures = 0, nstall = 0, nirq = 0;
  word_t v[$], w[$], got_cp[$], got_vout[$];

  tp_core dut (.*);

  assign mem_rdata = sram[mem_addr];
  always @(posedge clk) if (mem_we) sram[mem_addr] <= mem_wdata;
  always @(posedge clk) if (rst_n && vout_valid) got_vout.push_back(vout_data);
  assign cp_fin_pop = !cp_fin_empty;
  always @(posedge clk) if (rst_n && cp_fin_pop) got_cp.push_back(cp_fin_data);
  always @(posedge clk) if (rst_n && stalled) nstall++;
  always @(posedge clk) if (rst_n && dut.irq_ack) nirq++;

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load(int a, instr_t i);
    @(negedge clk); prog_we = 1; prog_addr = 8'(a); prog_wdata = i;
    @(negedge clk); prog_we = 0;
  endtask

  instr_t p [$];
  initial begin
    foreach (sram[i]) sram[i] = '0;
    for (int i = 0; i < 9; i++) v.push_back(16'($urandom));
    for (int i = 0; i < 8; i++) w.push_back(16'($urandom));
    p = '{tp_ldi(1, 1), tp_ldi(0, 16'h0FFF), tp_ldi(2, 16'h0FFF), tp_ien(2'b10),
          seq_loop(4, 7),
          tp_exec(MEM_NONE, 0, 0, 0, MV_VIN2STG, 0),
          tp_exec(MEM_NONE, 0, 0, 0, MV_VIN2STG, 1),
          tp_exec(MEM_WRITE, 1, 0, 1, MV_NONE, 0),
          seq_loop(4, 11),
          tp_exec(MEM_READ, 1, 2, 1, MV_NONE, 0),
          tp_exec(MEM_NONE, 0, 0, 0, MV_STG2CP, 0),
          tp_exec(MEM_NONE, 0, 0, 0, MV_STG2CP, 1),
          seq_loop(4, 15),
          tp_exec(MEM_NONE, 0, 0, 0, MV_CP2VOUT, 0),
          tp_exec(MEM_NONE, 0, 0, 0, MV_CP2STG, 1),
          tp_exec(MEM_NONE, 0, 0, 0, MV_STG2VOUT, 1),
          tp_exec(MEM_NONE, 0, 0, 0, MV_VIN2CP, 0),
          seq_halt()};
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (p[i]) load(i, p[i]);
    load(32'hF0, tp_exec(MEM_NONE, 1, 7, 1, MV_NONE, 0));
    load(32'hF1, seq_reti());
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    fork
      foreach (v[i]) begin
        repeat (3) @(negedge clk);
        vin_valid = 1; vin_data = v[i];
        @(posedge clk); while (!vin_ready) @(posedge clk);
        @(negedge clk) vin_valid = 0;
        if (i == 2 || i == 6) begin eol = 1; @(negedge clk) eol = 0; end
      end
      begin
        repeat (120) @(negedge clk);
        foreach (w[i]) begin
          cp_fout_push = 1; cp_fout_data = w[i];
          @(negedge clk);
        end
        cp_fout_push = 0;
      end
    join
    wait (!running);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 4; i++)
      check(sram[32'h1000 + i] == {v[2*i+1], v[2*i]}, $sformatf("memory word %0d", i));
    check(got_cp.size() == 9, $sformatf("words to CP %0d", got_cp.size()));
    foreach (got_cp[i]) if (i < 9) check(got_cp[i] == v[i], $sformatf("CP word %0d", i));
    check(got_vout.size() == 8, "video output count");
    foreach (got_vout[i]) if (i < 8) check(got_vout[i] == w[i], $sformatf("video word %0d", i));
    check(dut.u_au.rf[7] == 16'd2 && nirq == 2, "end-of-line interrupts counted");
    check(nstall > 0, "stalls on empty FIFO and video input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
