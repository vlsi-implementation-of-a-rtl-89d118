// cp_core - the computation processor (CP).
//
// The CP performs all lattice filter arithmetic of one multiresolution stage.
// It has four resources working in parallel: VF and HF (lattice
// cross-section units for the vertical and horizontal filters), one 10x16
// scaling multiplier and one 16-bit adder-subtractor, joined to each other and
// to the TP's FIFOs by three splittable buses. A 160 x 24 microprogram RAM
// and the shared sequencer (four hardware loop levels) control it.
//
// An EXEC microinstruction controls all resources in the same cycle (VF 6
// bits, HF 6 bits, adder 3, multiplier 3, FIFO pop/push 2): with the
// multiply, add and shift in each lattice unit plus the scaling multiply and
// the add/subtract, up to 8 operations happen per cycle. Settings that
// change rarely (bus routing, coefficients, shifts, register file pointers)
// are written by CONF microinstructions (encodings in sbc_pkg). The
// resource pipelines advance only in cycles where an EXEC issues, so a
// schedule's timing is counted in EXEC cycles. An EXEC that pops the empty
// input FIFO or pushes the full output FIFO stalls the CP.
// The resources, bus count and program RAM size follow the published
// design; the instruction formats are this design's own.
module cp_core
  import sbc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // host program loading and start
  input  logic            prog_we,
  input  logic [PC_W-1:0] prog_addr,
  input  instr_t          prog_wdata,
  input  logic            start,
  output logic            running,
  // FIFOs (held in the TP)
  input  word_t           fin_data,
  input  logic            fin_empty,
  output logic            fin_pop,
  output word_t           fout_data,
  output logic            fout_push,
  input  logic            fout_full,
  // status
  output logic            stalled,
  output logic [NBUS-1:0] bus_split,
  output logic            exec_o
);
  instr_t          instr;
  logic [PC_W-1:0] pc;
  logic            issue, in_isr, irq_ack;
  logic [$clog2(LOOP_LEVELS):0] depth;

  seq_op_e  op;
  cp_exec_t f;
  cp_cfg_e  grp;
  logic [3:0]  cidx;
  logic [12:0] cval;
  assign op   = seq_op_e'(instr[23:21]);
  assign f    = cp_exec_t'(instr[20:0]);
  assign grp  = cp_cfg_e'(instr[20:17]);
  assign cidx = instr[16:13];
  assign cval = instr[12:0];

  assign stalled = running && (op == OP_EXEC) &&
                   ((f.fin_pop && fin_empty) || (f.fout_push && fout_full));

  logic ex, conf;
  assign ex     = issue && (op == OP_EXEC);
  assign conf   = issue && (op == OP_CONF);
  assign exec_o = ex;

  prog_ram #(.DEPTH(CP_PROG_DEPTH), .WIDTH(INSTR_W), .AW(PC_W)) u_ram (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata),
    .raddr(pc), .rdata(instr));

  useq #(.LEVELS(LOOP_LEVELS)) u_seq (
    .clk, .rst_n, .start, .instr, .stall(stalled), .irq_valid(1'b0),
    .irq_vec('0), .irq_ack, .pc, .issue, .running, .in_isr, .depth);

  word_t vf_out, hf_out, mul_out, add_out;
  word_t dst [NDST];
  word_t seg [NBUS][2];

  cp_network u_net (
    .clk, .rst_n, .src_fin(fin_data), .src_vf(vf_out), .src_mul(mul_out),
    .src_add(add_out), .src_hf(hf_out),
    .bus_we(conf && grp == CG_BUS), .bus_idx(cidx[1:0]),
    .bus_val(bus_cfg_t'(cval[6:0])),
    .dst_we(conf && grp == CG_DST), .dst_idx(cidx[2:0]), .dst_val(cval[1:0]),
    .dst, .seg, .split_o(bus_split));

  lattice_pe u_vf (
    .clk, .rst_n, .en(ex), .ctl(f.vf), .bus_in(dst[DST_VF]),
    .rho_we(conf && grp == CG_VF_RHO), .shift_we(conf && grp == CG_VF_SHIFT),
    .bank_idx(cidx[2:0]), .rho_val(cval[RHO_W-1:0]), .shift_val(cval[3:0]),
    .cfg_we(conf && grp == CG_VF_CFG), .cfg_out_delay(cval[3]),
    .cfg_rho_last(cval[2:0]), .cfg_split(cval[4]), .cfg_fb_off(cval[8:5]),
    .cfg_fin_idx(cval[11:9]),
    .ptr_we(conf && grp == CG_VF_PTR), .ptr_wp(cidx), .ptr_rp(cval[3:0]),
    .ptr_rpf(cval[7:4]), .ptr_wpo(cval[11:8]),
    .rf_out(vf_out));

  lattice_pe u_hf (
    .clk, .rst_n, .en(ex), .ctl(f.hf), .bus_in(dst[DST_HF]),
    .rho_we(conf && grp == CG_HF_RHO), .shift_we(conf && grp == CG_HF_SHIFT),
    .bank_idx(cidx[2:0]), .rho_val(cval[RHO_W-1:0]), .shift_val(cval[3:0]),
    .cfg_we(conf && grp == CG_HF_CFG), .cfg_out_delay(cval[3]),
    .cfg_rho_last(cval[2:0]), .cfg_split(cval[4]), .cfg_fb_off(cval[8:5]),
    .cfg_fin_idx(cval[11:9]),
    .ptr_we(conf && grp == CG_HF_PTR), .ptr_wp(cidx), .ptr_rp(cval[3:0]),
    .ptr_rpf(cval[7:4]), .ptr_wpo(cval[11:8]),
    .rf_out(hf_out));

  scale_mult u_mul (
    .clk, .rst_n, .en(ex), .ld(f.mul_ld), .coef_sel(f.mul_coef),
    .din(dst[DST_MUL]), .coef_we(conf && grp == CG_SCALE),
    .coef_idx(cidx[1:0]), .coef_val(cval[SCL_W-1:0]), .dout(mul_out));

  addsub16 u_add (
    .clk, .rst_n, .en(ex), .lda(f.add_lda), .op(f.add_op),
    .a_in(dst[DST_ADDA]), .b_in(dst[DST_ADDB]), .dout(add_out));

  assign fin_pop   = ex && f.fin_pop;
  assign fout_push = ex && f.fout_push;
  assign fout_data = dst[DST_FOUT];
endmodule
