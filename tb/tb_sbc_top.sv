// tb_sbc_top - end-to-end test of the bi-processor coder.
//
// The host loads a TP program and a CP program, starts the TP at once and the
// CP 300 cycles later. Pixels arrive on the video input with end-of-line
// pulses; the TP hands each pixel to the CP from its data-input interrupt
// routine (the late CP start fills the FIFO, so the TP stalls and the video
// input sees back-pressure), counts lines in its end-of-line routine, packs
// the CP's low/high results into 32-bit memory words and, once the picture is
// done, plays them back on the video output. The CP runs a 6-tap lattice
// analysis filter over two nested hardware loops. Results on the video output
// and in the external memory model are compared with an integer reference
// model, and each mechanism is counted and must occur.
module tb_sbc_top;
  import sbc_pkg::*;
  import tb_sbc_pkg::*;

  localparam int NLINES = 2;
  localparam int NPAIRS = 10;            // pixel pairs per line
  localparam int NPIX   = NLINES * NPAIRS * 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic prog_we = 0, prog_sel = 0, tp_start = 0, cp_start = 0;
  logic [7:0] prog_addr = 0;
  instr_t prog_wdata = 0;
  logic tp_running, cp_running, mem_we, mem_re, vin_ready, vout_valid;
  logic tp_stalled, cp_stalled;
  logic [2:0] cp_bus_split;
  logic [15:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  word_t vin_data = 0, vout_data;
  logic vin_valid = 0, eol = 0;

  sbc_top dut (.*);

  // external asynchronous SRAM model
  logic [31:0] sram [65536];
  assign mem_rdata = sram[mem_addr];
  always @(posedge clk) if (rst_n && mem_we) sram[mem_addr] <= mem_wdata;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_tp_stall = 0, n_cp_stall = 0, n_irq0 = 0, n_irq1 = 0, n_fifo_full = 0;
  int n_split = 0, n_nest_tp = 0, n_nest_cp = 0, n_mw = 0, n_mr = 0, n_cp_ex = 0;
  int n_vin_block = 0;
  always @(posedge clk) if (rst_n) begin
    if (tp_stalled) n_tp_stall++;
    if (cp_stalled) n_cp_stall++;
    if (dut.u_tp.irq_ack && dut.u_tp.irq_vec == TP_VEC0) n_irq0++;
    if (dut.u_tp.irq_ack && dut.u_tp.irq_vec == TP_VEC1) n_irq1++;
    if (dut.u_tp.tocp_full) n_fifo_full++;
    if (cp_bus_split != 0 && dut.u_cp.exec_o) n_split++;
    if (dut.u_tp.depth == 2) n_nest_tp++;
    if (dut.u_cp.depth == 2) n_nest_cp++;
    if (mem_we) n_mw++;
    if (mem_re) n_mr++;
    if (dut.u_cp.exec_o) n_cp_ex++;
    if (vin_valid && !vin_ready) n_vin_block++;
  end

  task automatic load(bit sel, int addr, instr_t w);
    @(negedge clk);
    prog_we = 1; prog_sel = sel; prog_addr = 8'(addr); prog_wdata = w;
    @(negedge clk);
    prog_we = 0;
  endtask

  int x[$], y[$], got[$];
  always @(posedge clk) if (rst_n && vout_valid) got.push_back(int'(signed'(vout_data)));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog_t tp, cp, i0, i1;
    int t_start;
    for (int i = 0; i < NPIX; i++) begin
      if (i < 4) x.push_back((i % 2 != 0) ? 32767 : -32768);   // saturating corner
      else       x.push_back(int'(signed'(16'($urandom))));
    end
    ref_filter(x, y);
    foreach (sram[i]) sram[i] = '0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    tp = tp_stream_prog(NLINES, NPAIRS);
    cp = cp_filter_prog(NLINES, NPAIRS);
    i0 = tp_isr0();
    i1 = tp_isr1();
    foreach (tp[i]) load(0, i, tp[i]);
    foreach (i0[i]) load(0, int'(TP_VEC0) + i, i0[i]);
    foreach (i1[i]) load(0, int'(TP_VEC1) + i, i1[i]);
    foreach (cp[i]) load(1, i, cp[i]);

    @(negedge clk) tp_start = 1;
    @(negedge clk) tp_start = 0;
    t_start = cyc;
    fork
      begin
        repeat (300) @(negedge clk);
        cp_start = 1;
        @(negedge clk) cp_start = 0;
      end
      begin
        for (int l = 0; l < NLINES; l++) begin
          for (int i = 0; i < 2 * NPAIRS; i++) begin
            @(negedge clk);
            vin_valid = 1;
            vin_data  = 16'(x[l * 2 * NPAIRS + i]);
            @(posedge clk);
            while (!vin_ready) @(posedge clk);
            @(negedge clk);
            vin_valid = 0;
            repeat (2) @(negedge clk);
          end
          eol = 1;
          @(negedge clk) eol = 0;
          repeat (400) @(negedge clk);     // line blanking
        end
      end
    join
    wait (!tp_running && !cp_running);
    repeat (5) @(posedge clk);

    // results on the video output
    check(got.size() == y.size(), $sformatf("output count %0d expected %0d", got.size(), y.size()));
    foreach (y[i])
      if (i < got.size()) check(got[i] == y[i], $sformatf("out[%0d] %0d expected %0d", i, got[i], y[i]));
    // results packed in memory: low in bits 15:0, high in 31:16
    for (int w = 0; w < NLINES * NPAIRS; w++) begin
      logic [31:0] m;
      m = sram[w];
      check(int'(signed'(m[15:0])) == y[2*w] && int'(signed'(m[31:16])) == y[2*w+1],
            $sformatf("memory word %0d = %h", w, m));
    end
    check(dut.u_tp.u_au.rf[7] == 16'(NLINES), "line counter of end-of-line routine");
    // CP timing: 15 EXEC cycles per pair plus one loop tail per line
    check(n_cp_ex == NLINES * (NPAIRS * 15 + 1), $sformatf("CP EXEC cycles %0d", n_cp_ex));
    // every mechanism happened
    check(n_tp_stall  > 0, "TP stall");
    check(n_cp_stall  > 0, "CP stall on empty FIFO");
    check(n_irq0 == NPIX, $sformatf("data-input interrupts %0d", n_irq0));
    check(n_irq1 == NLINES, $sformatf("end-of-line interrupts %0d", n_irq1));
    check(n_fifo_full > 0, "FIFO full");
    check(n_vin_block > 0, "video input back-pressure");
    check(n_split > 0, "split bus in use");
    check(n_nest_tp > 0 && n_nest_cp > 0, "nested loops");
    check(n_mw == NLINES * NPAIRS && n_mr == NLINES * NPAIRS, "memory accesses");
    $display("mechanisms: tp_stall=%0d cp_stall=%0d irq0=%0d irq1=%0d fifo_full=%0d vin_block=%0d split=%0d nest=%0d/%0d mw=%0d mr=%0d cycles=%0d",
             n_tp_stall, n_cp_stall, n_irq0, n_irq1, n_fifo_full, n_vin_block, n_split,
             n_nest_tp, n_nest_cp, n_mw, n_mr, cyc - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
