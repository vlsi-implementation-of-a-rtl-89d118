// tb_cp_network - random routing configurations of the three buses: checks
// that every destination sees the source that a model of joined and split
// bus segments (and of the direct HF/adder link) predicts.
module tb_cp_network;
  import sbc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  word_t src_fin, src_vf, src_mul, src_add, src_hf;
  logic bus_we = 0, dst_we = 0;
  logic [1:0] bus_idx = 0, dst_val = 0;
  bus_cfg_t bus_val = '0;
  logic [2:0] dst_idx = 0;
  word_t dst [NDST];
  word_t seg [NBUS][2];
  logic [NBUS-1:0] split_o;
  bus_cfg_t mb [NBUS];
  logic [1:0] md [NDST];
  int checks = 0, failures = 0, nsplit = 0;

  cp_network dut (.*);

  task automatic check(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic word_t val(cp_src_e s);
    case (s)
      SRC_FIN: return src_fin;
      SRC_VF:  return src_vf;
      SRC_MUL: return src_mul;
      SRC_ADD: return src_add;
      SRC_HF:  return src_hf;
      default: return 16'h0;
    endcase
  endfunction

  cp_src_e near [3] = '{SRC_NONE, SRC_FIN, SRC_VF};
  cp_src_e far  [4] = '{SRC_NONE, SRC_MUL, SRC_ADD, SRC_HF};

  initial begin
    foreach (mb[i]) mb[i] = '0;
    foreach (md[i]) md[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      // reconfigure one bus (a split bus gets one driver per side)
      @(negedge clk);
      bus_we = 1; bus_idx = 2'($urandom % 3);
      bus_val.split = 1'($urandom);
      if (bus_val.split) begin
        bus_val.drv0 = near[$urandom % 3];
        bus_val.drv1 = far[$urandom % 4];
        nsplit++;
      end else begin
        bus_val.drv0 = cp_src_e'($urandom % 6);
        bus_val.drv1 = SRC_NONE;
      end
      mb[bus_idx] = bus_val;
      dst_we = 1; dst_idx = 3'($urandom % 6); dst_val = 2'($urandom);
      md[dst_idx] = dst_val;
      @(negedge clk);
      bus_we = 0; dst_we = 0;
      for (int k = 0; k < 4; k++) begin
        src_fin = 16'($urandom); src_vf = 16'($urandom); src_mul = 16'($urandom);
        src_add = 16'($urandom); src_hf = 16'($urandom);
        #1;
        for (int d = 0; d < NDST; d++) begin
          word_t e;
          cp_dst_e de;
          bit far_side;
          bus_cfg_t b;
          de = cp_dst_e'(d);
          far_side = (de == DST_MUL || de == DST_ADDA || de == DST_ADDB || de == DST_HF);
          if (md[d] == 2'd3) begin
            e = (de == DST_ADDA || de == DST_ADDB) ? src_hf : (de == DST_HF) ? src_add : 16'h0;
          end else begin
            b = mb[md[d]];
            e = (b.split && far_side) ? val(b.drv1) : val(b.drv0);
          end
          check(dst[d] == e, $sformatf("dest %s got %h expected %h", de.name(), dst[d], e));
        end
      end
    end
    check(nsplit > 0, "split configurations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
