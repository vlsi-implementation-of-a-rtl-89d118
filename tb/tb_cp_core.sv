// tb_cp_core - loads the 6-tap lattice filter microprogram into the CP and
// streams samples through it over two nested loops. The testbench models
// the two FIFOs: the input FIFO is fed with gaps (so the CP stalls on empty)
// and the output FIFO is reported full now and then (so it stalls on full).
// Checks every output against the integer reference, the number of EXEC
// cycles (15 per sample pair plus one loop tail per line) and that both kinds
// of stall occurred.
module tb_cp_core;
  import sbc_pkg::*;
  import tb_sbc_pkg::*;
  localparam int NLINES = 3, NPAIRS = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_we = 0, start = 0, running, fin_pop, fout_push, stalled, exec_o;
  logic fin_empty, fout_full = 0;
  logic [7:0] prog_addr = 0;
  instr_t prog_wdata = 0;
  word_t fin_data, fout_data;
  logic [2:0] bus_split;
  int checks = 0, failures = 0, n_ex = 0, n_st_in = 0, n_st_out = 0;
  word_t inq[$];
  int x[$], y[$], got[$];

  cp_core dut (.*);

  assign fin_empty = (inq.size() == 0);
  assign fin_data  = fin_empty ? 16'h0 : inq[0];
  always @(posedge clk) if (rst_n) begin
    if (fin_pop) void'(inq.pop_front());
    if (fout_push && !fout_full) got.push_back(int'(signed'(fout_data)));
    if (exec_o) n_ex++;
    if (stalled && fin_empty) n_st_in++;
    if (stalled && fout_full) n_st_out++;
  end
  always @(negedge clk) fout_full <= ($urandom % 8) == 0;

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prog_t p;
    for (int i = 0; i < 2 * NLINES * NPAIRS; i++) x.push_back(int'(signed'(16'($urandom))));
    ref_filter(x, y);
    p = cp_filter_prog(NLINES, NPAIRS);
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (p[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = p[i];
    end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    foreach (x[i]) begin
      repeat ((i % 10 == 9) ? 100 : $urandom % 4) @(negedge clk);
      inq.push_back(16'(x[i]));
    end
    wait (!running);
    repeat (3) @(negedge clk);
    check(got.size() == y.size(), $sformatf("output count %0d", got.size()));
    foreach (y[i]) if (i < got.size()) check(got[i] == y[i], $sformatf("out[%0d] %0d expected %0d", i, got[i], y[i]));
    check(n_ex == NLINES * (15 * NPAIRS + 1), $sformatf("EXEC cycles %0d", n_ex));
    check(n_st_in > 0, "stall on empty input FIFO");
    check(n_st_out > 0, "stall on full output FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
