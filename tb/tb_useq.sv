// tb_useq - runs a small program with two nested hardware loops, a jump and
// a halt through the sequencer. Checks the order of issued instructions, the
// zero loop overhead (cycle count), that stalls only delay execution, and
// that an interrupt taken inside the loops runs its routine and resumes
// where it left off with the loop state intact.
module tb_useq;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, stall = 0, irq_valid = 0, irq_ack, issue, running, in_isr;
  logic [7:0] pc;
  logic [2:0] depth;
  instr_t instr;
  instr_t prog [256];
  int checks = 0, failures = 0;
  int trace[$];
  int cycles;

  assign instr = prog[pc];

  useq #(.LEVELS(4)) dut (.clk, .rst_n, .start, .instr, .stall, .irq_valid,
    .irq_vec(8'h20), .irq_ack, .pc, .issue, .running, .in_isr, .depth);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) if (issue) trace.push_back(int'(pc));
  always @(posedge clk) if (irq_ack) irq_valid <= 0;

  task automatic run(int stall_pct, int irq_at, output int ncyc);
    trace = {};
    ncyc = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (running) begin
      stall = ($urandom % 100) < stall_pct && prog[pc][23:21] == 3'(OP_EXEC);
      if (ncyc == irq_at) irq_valid = 1;  // ncyc = running cycles so far
      @(negedge clk);
      ncyc++;
    end
    stall = 0;
  endtask

  int exp1[$] = '{0, 2,4,4,5, 2,4,4,5, 2,4,4,5, 8};
  int exp_irq[$];

  initial begin
    foreach (prog[i]) prog[i] = cp_exec('0);
    prog[1] = seq_loop(8'd3, 8'd5);
    prog[3] = seq_loop(8'd2, 8'd4);
    prog[6] = seq_jump(8'd8);
    prog[9] = seq_halt();
    prog[8'h21] = seq_reti();
    repeat (2) @(posedge clk); rst_n = 1;

    run(0, -1, cycles);
    check(trace == exp1, "loop/jump trace");
    check(cycles == 20, $sformatf("zero-overhead cycle count %0d expected 20", cycles));
    check(depth == 0, "loop stack empty at halt");

    run(30, -1, cycles);
    check(trace == exp1, "trace with stalls");
    check(cycles > 20, "stalls add cycles");

    // interrupt requested at cycle 9 (inside the inner loop)
    run(0, 9, cycles);
    check(trace.size() == exp1.size() + 1, "one extra instruction from the routine");
    begin
      automatic int k = -1;
      foreach (trace[i]) if (trace[i] == 32) k = i;
      check(k > 0, "routine ran");
      if (k > 0) begin
        exp_irq = exp1;
        exp_irq.insert(k, 32);
        check(trace == exp_irq, "main flow resumes unchanged after RETI");
      end
    end
    check(cycles == 20 + 3, $sformatf("interrupt costs entry, body and RETI: %0d", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
