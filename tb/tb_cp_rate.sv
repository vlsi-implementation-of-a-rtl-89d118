// tb_cp_rate - throughput of the computation processor with software-
// pipelined microprograms: the 6-tap lattice filter on VF and HF
// (cp_pipe_prog, 3 cycles per pair) and the 8-tap filter with all three
// cross-sections on HF (cp_pipe8_prog, L-2 = 6 cycles per pair, using the
// split register file).
//
// Each stream is run after a reset. 6-tap: a short one of 10 pairs (one
// hardware loop) and one CCIR 601 luminance line of 720 samples, i.e. 360
// pairs (the steady state needs two nested loops). 8-tap: 10 and 200 pairs.
// The input FIFO always holds data and the output FIFO is never full, so
// the CP must not stall.
// Checks every output against the integer reference, the number of EXEC
// cycles (the period per pair, plus the fill and drain), that no stall
// occurred, and that the outputs follow each other at the period per pair
// apart from the few loop words.
module tb_cp_rate;
  import sbc_pkg::*;
  import tb_sbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_we = 0, start = 0, running, fin_pop, fout_push, stalled, exec_o;
  logic fin_empty, fout_full = 0;
  logic [7:0] prog_addr = 0;
  instr_t prog_wdata = 0;
  word_t fin_data, fout_data;
  logic [2:0] bus_split;
  int checks = 0, failures = 0, n_ex = 0, n_st = 0, cyc = 0;
  int first_push = -1, last_push = -1;
  word_t inq[$];
  int got[$];

  cp_core dut (.*);

  assign fin_empty = (inq.size() == 0);
  assign fin_data  = fin_empty ? 16'h0 : inq[0];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (fin_pop && !stalled) void'(inq.pop_front());
    if (fout_push && !stalled) begin
      got.push_back(int'(signed'(fout_data)));
      if (first_push < 0) first_push = cyc;
      last_push = cyc;
    end
    if (exec_o) n_ex++;
    if (stalled) n_st++;
  end

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // taps 6: cp_pipe_prog (VF and HF, 3 cycles per pair)
  // taps 8: cp_pipe8_prog (HF alone, L-2 = 6 cycles per pair)
  task automatic run(int taps, int npairs);
    prog_t p;
    int x[$], y[$], steady, outer, ii, depth;
    ii    = (taps == 8) ? P8_II : PIPE_II;
    depth = (taps == 8) ? P8_DEPTH : PIPE_DEPTH;
    steady = npairs - depth + 1;
    outer = 1;
    while (steady / outer > 255 || steady % outer != 0) outer++;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    n_ex = 0; n_st = 0; first_push = -1; last_push = -1; got = {};
    for (int i = 0; i < 2 * npairs; i++) x.push_back(int'(signed'(16'($urandom))));
    x[0] = 32767; x[1] = 32767;                       // saturating corner
    if (taps == 8) ref_filter8(x, y); else ref_filter(x, y);
    foreach (x[i]) inq.push_back(16'(x[i]));
    p = (taps == 8) ? cp_pipe8_prog(npairs) : cp_pipe_prog(npairs);
    check(p.size() <= CP_PROG_DEPTH, $sformatf("program size %0d", p.size()));
    foreach (p[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = p[i];
    end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (!running);
    repeat (3) @(negedge clk);
    check(got.size() == y.size(), $sformatf("output count %0d", got.size()));
    foreach (y[i]) if (i < got.size())
      check(got[i] == y[i], $sformatf("out[%0d] %0d expected %0d", i, got[i], y[i]));
    check(n_ex == ii * (npairs + depth - 1), $sformatf("EXEC cycles %0d", n_ex));
    check(n_st == 0, $sformatf("stall cycles %0d", n_st));
    // loop words inside the stream: outer LOOP, inner LOOP per outer pass,
    // outer tail CONF per outer pass
    check(last_push - first_push <= ii * (npairs - 1) + 1 + 2 * outer + 1,
          $sformatf("first to last output %0d cycles", last_push - first_push));
    $display("%0d-tap, %0d pairs: %0d cycles from first to last output", taps, npairs, last_push - first_push);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run(6, 10);
    run(6, 360);
    run(8, 10);
    run(8, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
