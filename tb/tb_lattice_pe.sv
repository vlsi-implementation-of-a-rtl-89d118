// tb_lattice_pe - runs two lattice cross-sections back to back on one
// resource: the first from the bus, the second re-reading the first's results
// from the resource's own register file, with different coefficients and
// shifts per section (coefficient pointer stepping and wrapping). Random
// idle (en low) cycles are inserted to check that the pipeline freezes. Run
// with the direct output path and with the two-register output delay, and
// with samples that drive the shifter into saturation, and once more with
// the register file split (feedback pointer with offset for the second
// section's inputs, final results in the upper half). Results are read back
// through the register file port and compared with integer arithmetic.
module tb_lattice_pe;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0;
  pe_ctl_t ctl = '0;
  word_t bus_in = 0, rf_out;
  logic rho_we = 0, shift_we = 0, cfg_we = 0, cfg_out_delay = 0, ptr_we = 0;
  logic [2:0] bank_idx = 0, cfg_rho_last = 0;
  logic [7:0] rho_val = 0;
  logic [3:0] shift_val = 0, ptr_wp = 0, ptr_rp = 0;
  // split register file mode (used in the third pass): section 1 is the
  // final one; feedback reads rf[rpf] = rf[1] (low) then rf[rpf+7] = rf[0]
  logic cfg_split = 0;
  logic [3:0] cfg_fb_off = 4'd7, ptr_rpf = 4'd1, ptr_wpo = 4'd0;
  logic [2:0] cfg_fin_idx = 3'd1;
  int checks = 0, failures = 0;

  lattice_pe dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  function automatic int xs(int a, int b, int rho, int sh);
    return sat16(((longint'(a) <<< 6) + longint'(rho) * b) >>> sh);
  endfunction

  typedef struct { pe_ctl_t c; word_t bus; bit setp; logic [3:0] wp, rp; } step_t;

  // one enabled cycle, possibly preceded by idle cycles
  task automatic cyc(step_t s);
    while ($urandom % 4 == 0) begin
      @(negedge clk); en = 0; ctl = pe_ctl_t'($urandom); ptr_we = 0;
    end
    @(negedge clk);
    en = 1; ctl = s.c; bus_in = s.bus; ptr_we = s.setp; ptr_wp = s.wp; ptr_rp = s.rp;
  endtask

  task automatic two_sections(int u, int l, int od, int rho0, int rho1, int sh0, int sh1,
                              bit sp = 0);
    step_t st [16];
    int u1, l1, u2, l2;
    foreach (st[i]) st[i] = '{c: '0, bus: '0, setp: 0, wp: 0, rp: 0};
    st[0].setp = 1; st[0].wp = 0; st[0].rp = 0;
    st[0].c.x_ld = 1; st[0].bus = 16'(l);
    st[1].c.x_ld = 1; st[1].bus = 16'(u);
    st[2].c.rho_nxt = 1;
    st[3].c.add_delay = 1;
    st[3 + od].c.rf_we = 1;                    // out_up  -> rf[0]
    st[4 + od].c.rf_we = 1;                    // out_low -> rf[1]
    // second section reads rf[1] (low) then rf[0] (up): unified mode moves
    // the read pointer, split mode uses the feedback pointer and offset
    if (!sp) begin
      st[5 + od].setp = 1; st[5 + od].wp = 2; st[5 + od].rp = 1;
      st[6 + od].setp = 1; st[6 + od].wp = 2; st[6 + od].rp = 0;
    end
    st[6 + od].c.x_ld = 1; st[6 + od].c.x_from_rf = 1;
    st[7 + od].c.x_ld = 1; st[7 + od].c.x_from_rf = 1;
    st[8 + od].c.rho_nxt = 1;
    st[9 + od].c.add_delay = 1;
    st[9 + 2*od].c.rf_we = 1;                  // -> rf[2] (split: rf[8])
    st[10 + 2*od].c.rf_we = 1;                 // -> rf[3] (split: rf[9])
    for (int i = 0; i < 11 + 2*od; i++) cyc(st[i]);
    @(negedge clk); en = 0; ctl = '0; ptr_we = 0;
    u1 = xs(u, l, rho0, sh0); l1 = xs(l, u, rho0, sh0);
    u2 = xs(u1, l1, rho1, sh1); l2 = xs(l1, u1, rho1, sh1);
    // split mode: the bus reads the final half only (rp 0, 1 -> rf[8], rf[9])
    for (int k = sp ? 2 : 0; k < 4; k++) begin
      int e = (k == 0) ? u1 : (k == 1) ? l1 : (k == 2) ? u2 : l2;
      ptr_we = 1; ptr_rp = sp ? 4'(k - 2) : 4'(k); ptr_wp = 0;
      @(negedge clk); ptr_we = 0;
      check(int'(signed'(rf_out)) == e,
            $sformatf("sp=%0d od=%0d u=%0d l=%0d result %0d: %0d expected %0d", sp, od, u, l, k,
                      int'(signed'(rf_out)), e));
    end
  endtask

  task automatic configure(int rho0, int rho1, int sh0, int sh1, bit od, bit sp = 0);
    @(negedge clk);
    rho_we = 1; bank_idx = 0; rho_val = 8'(rho0);
    @(negedge clk); bank_idx = 1; rho_val = 8'(rho1);
    @(negedge clk); rho_we = 0; shift_we = 1; bank_idx = 0; shift_val = 4'(sh0);
    @(negedge clk); bank_idx = 1; shift_val = 4'(sh1);
    @(negedge clk); shift_we = 0; cfg_we = 1; cfg_rho_last = 3'd1; cfg_out_delay = od;
    cfg_split = sp;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // passes: direct output, delayed output, split register file with
    // delayed output
    for (int pass = 0; pass < 3; pass++) begin
      automatic int od = (pass > 0) ? 1 : 0;
      automatic bit sp = (pass == 2);
      automatic int r0 = 45, r1 = -83, s0 = 6, s1 = 7;
      configure(r0, r1, s0, s1, od[0], sp);
      two_sections(32767, -32768, 2*od, r0, r1, s0, s1, sp);   // saturates
      two_sections(-32768, -32768, 2*od, r0, r1, s0, s1, sp);
      for (int n = 0; n < 40; n++) begin
        r0 = int'(signed'(8'($urandom))); r1 = int'(signed'(8'($urandom)));
        s0 = 4 + $urandom % 6; s1 = 4 + $urandom % 6;
        configure(r0, r1, s0, s1, od[0], sp);
        two_sections(int'(signed'(16'($urandom))), int'(signed'(16'($urandom))),
                     2*od, r0, r1, s0, s1, sp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
