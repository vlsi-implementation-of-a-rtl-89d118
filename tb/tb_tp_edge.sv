// tb_tp_edge - edge extension done by the transfer processor.
//
// A filter applied to a line of finite length needs samples beyond both
// ends. Here the TP provides them: its microprogram reads each stored line
// from the data memory and sends it to the CP FIFO with a whole-sample
// symmetric extension of two samples per side,
//   x2 x1 | x0 x1 ... x(W-1) | x(W-2) x(W-3),
// which is what a 6-tap filter (two samples of history) needs. The mirrored
// samples come only from address arithmetic in the program: base+2 and
// base+1 before the line, pointer-1 after it, and the staging half that
// holds the wanted sample. Lines are stored two samples per 32-bit word
// (even sample in the low half), one after another.
//
// The testbench plays the SRAM and the CP side (which pops whenever the
// FIFO holds data). It checks every word sent to the CP for several lines
// handled by two nested hardware loops, and the cycle count: a line of W
// samples takes 3*W/2 + 8 cycles (3 per stored word, 4 for the mirrored
// samples, 1 for the inner LOOP word).
module tb_tp_edge;
  import sbc_pkg::*;
  localparam int W = 12;           // samples per line
  localparam int NL = 3;           // lines
  localparam int BASE = 'h200;     // word address of the first line
  localparam int T_OVH = 1;        // the HALT word
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
  int checks = 0, failures = 0, cyc = 0, t_start = 0, t_end = 0;
  word_t got_cp[$];

  tp_core dut (.*);

  assign mem_rdata = sram[mem_addr];
  always @(posedge clk) if (mem_we) sram[mem_addr] <= mem_wdata;
  assign cp_fin_pop = !cp_fin_empty;
  always @(posedge clk) if (rst_n && cp_fin_pop) got_cp.push_back(cp_fin_data);
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load(int a, instr_t i);
    @(negedge clk); prog_we = 1; prog_addr = 8'(a); prog_wdata = i;
    @(negedge clk); prog_we = 0;
  endtask

  // r0 = 0, r1 = 1, r3 = -1, r6 = 2; r2 points one word before the line
  // and walks through it, ending on its last word
  instr_t p [$];
  initial begin
    int x[NL][W];
    word_t exp_cp[$];
    foreach (sram[i]) sram[i] = '0;
    for (int l = 0; l < NL; l++) begin
      for (int i = 0; i < W; i++) x[l][i] = int'($urandom % 65536);
      for (int k = 0; k < W / 2; k++)
        sram[BASE + l * W / 2 + k] = {16'(x[l][2*k+1]), 16'(x[l][2*k])};
      exp_cp.push_back(16'(x[l][2]));
      exp_cp.push_back(16'(x[l][1]));
      for (int i = 0; i < W; i++) exp_cp.push_back(16'(x[l][i]));
      exp_cp.push_back(16'(x[l][W-2]));
      exp_cp.push_back(16'(x[l][W-3]));
    end
    p = '{tp_ldi(0, 0), tp_ldi(1, 1), tp_ldi(3, 16'hFFFF), tp_ldi(6, 2),
          tp_ldi(2, 16'(BASE - 1)),
          seq_loop(8'(NL), 8'd16),                           // 5
          tp_exec(MEM_READ, 0, 2, 6, MV_NONE, 0),            // 6  word 1
          tp_exec(MEM_NONE, 0, 0, 0, MV_STG2CP, 0),          // 7  x2
          tp_exec(MEM_READ, 0, 2, 1, MV_NONE, 0),            // 8  word 0
          tp_exec(MEM_NONE, 0, 0, 0, MV_STG2CP, 1),          // 9  x1
          seq_loop(8'(W / 2), 8'd13),                        // 10
          tp_exec(MEM_READ, 1, 2, 1, MV_NONE, 0),            // 11 next word
          tp_exec(MEM_NONE, 0, 0, 0, MV_STG2CP, 0),          // 12
          tp_exec(MEM_NONE, 0, 0, 0, MV_STG2CP, 1),          // 13
          tp_exec(MEM_NONE, 0, 0, 0, MV_STG2CP, 0),          // 14 x(W-2)
          tp_exec(MEM_READ, 0, 2, 3, MV_NONE, 0),            // 15 word before last
          tp_exec(MEM_NONE, 0, 0, 0, MV_STG2CP, 1),          // 16 x(W-3)
          seq_halt()};
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (p[i]) load(i, p[i]);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t_start = cyc;
    wait (!running);
    t_end = cyc;
    repeat (3) @(negedge clk);
    check(got_cp.size() == exp_cp.size(), $sformatf("words to CP %0d", got_cp.size()));
    foreach (exp_cp[i]) if (i < got_cp.size())
      check(got_cp[i] == exp_cp[i], $sformatf("CP word %0d: %h expected %h", i, got_cp[i], exp_cp[i]));
    check(t_end - t_start == 6 + NL * (3 * W / 2 + 8) + T_OVH,
          $sformatf("%0d cycles from start to halt", t_end - t_start));
    $display("%0d lines of %0d samples: %0d cycles", NL, W, t_end - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
