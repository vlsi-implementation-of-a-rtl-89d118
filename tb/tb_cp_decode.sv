// tb_cp_decode - coding and decoding on the computation processor.
//
// The CP first runs the 6-tap analysis program (cp_filter_prog) on a block
// of samples. After a reset it runs the synthesis program (cp_synth_prog)
// on the analysis output. Checks both outputs bit for bit against the
// integer models (ref_filter, ref_synth), and that the decoded samples
// reconstruct the input: with a delay of two pairs, each decoded sample must
// lie within a small rounding tolerance of the original. The synthesis
// step count (14 EXEC cycles per pair) is checked too.
module tb_cp_decode;
  import sbc_pkg::*;
  import tb_sbc_pkg::*;
  localparam int NPAIRS = 60;
  localparam int AMP = 1000;       // input amplitude, no saturation inside
  localparam int TOL = 16;         // reconstruction tolerance in LSBs
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic prog_we = 0, start = 0, running, fin_pop, fout_push, stalled, exec_o;
  logic fin_empty, fout_full = 0;
  logic [7:0] prog_addr = 0;
  instr_t prog_wdata = 0;
  word_t fin_data, fout_data;
  logic [2:0] bus_split;
  int checks = 0, failures = 0, n_ex = 0;
  word_t inq[$];
  int got[$];

  cp_core dut (.*);

  assign fin_empty = (inq.size() == 0);
  assign fin_data  = fin_empty ? 16'h0 : inq[0];
  always @(posedge clk) if (rst_n) begin
    if (fin_pop && !stalled) void'(inq.pop_front());
    if (fout_push && !stalled) got.push_back(int'(signed'(fout_data)));
    if (exec_o) n_ex++;
  end

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reset, load p, stream din through it, return the outputs
  task automatic run(prog_t p, int din[$], output int dout[$]);
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    n_ex = 0; got = {};
    foreach (din[i]) inq.push_back(16'(din[i]));
    foreach (p[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_wdata = p[i];
    end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (!running);
    repeat (3) @(negedge clk);
    dout = got;
  endtask

  initial begin
    automatic int x[$], y[$], z[$], ya[$], za[$], maxerr = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 2 * NPAIRS; i++) x.push_back(int'($urandom % (2 * AMP + 1)) - AMP);
    ref_filter(x, y);
    ref_synth(y, z);
    // coding
    run(cp_filter_prog(1, NPAIRS), x, ya);
    check(ya.size() == y.size(), $sformatf("analysis output count %0d", ya.size()));
    foreach (y[i]) if (i < ya.size())
      check(ya[i] == y[i], $sformatf("analysis out[%0d] %0d expected %0d", i, ya[i], y[i]));
    // decoding of what the hardware coded
    run(cp_synth_prog(NPAIRS), ya, za);
    check(n_ex == 14 * NPAIRS, $sformatf("synthesis EXEC cycles %0d", n_ex));
    check(za.size() == z.size(), $sformatf("synthesis output count %0d", za.size()));
    foreach (z[i]) if (i < za.size())
      check(za[i] == z[i], $sformatf("synthesis out[%0d] %0d expected %0d", i, za[i], z[i]));
    // reconstruction: decoded pair m is input pair m-2
    for (int i = 4; i < za.size(); i++) begin
      automatic int e = za[i] - x[i - 4];
      if (e < 0) e = -e;
      if (e > maxerr) maxerr = e;
      check(e <= TOL, $sformatf("reconstruction of x[%0d]: %0d, input %0d", i - 4, za[i], x[i - 4]));
    end
    $display("largest reconstruction error %0d LSB for inputs within +-%0d", maxerr, AMP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
