// tp_core - the transfer processor (TP).
//
// The TP acts as an intelligent DMA engine feeding the computation processor
// (CP). It contains its own microprogram RAM (256 x 24) and sequencer, an
// interrupt controller for the data-input and end-of-line interrupts, the
// address unit that addresses the 32-bit external data memory, the 32/16-bit
// format conversion with the video ports, and the two 16 x 16 FIFOs to and
// from the CP.
//
// Each EXEC microinstruction does, in one cycle, at most one memory access
// (address rf[ra] + rf[rb], optional pointer write-back) and one 16-bit move
// between the video input, the staging register halves, the FIFOs and the
// video output (encodings in sbc_pkg). A move that would read an empty FIFO
// or an empty video input register, or write a full FIFO, stalls the TP
// until it can proceed: this is how the TP synchronises with the CP and with
// the video source. The memory interface is that of an asynchronous SRAM:
// address, write strobe and write data are combinational in the access
// cycle, read data is sampled at the end of it. The block structure follows
// the published design; the instruction set and the SRAM timing are this
// design's own.
module tp_core
  import sbc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host program loading and start
  input  logic              prog_we,
  input  logic [PC_W-1:0]   prog_addr,
  input  instr_t            prog_wdata,
  input  logic              start,
  output logic              running,
  // data memory
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_we,
  output logic              mem_re,
  output logic [MEM_W-1:0]  mem_wdata,
  input  logic [MEM_W-1:0]  mem_rdata,
  // video
  input  word_t             vin_data,
  input  logic              vin_valid,
  output logic              vin_ready,
  input  logic              eol,         // end of line pulse
  output word_t             vout_data,
  output logic              vout_valid,
  // CP side of the FIFOs
  output word_t             cp_fin_data,
  output logic              cp_fin_empty,
  input  logic              cp_fin_pop,
  input  word_t             cp_fout_data,
  input  logic              cp_fout_push,
  output logic              cp_fout_full,
  // status
  output logic              stalled
);
  instr_t          instr;
  logic [PC_W-1:0] pc;
  logic            issue, irq_valid, irq_ack, in_isr;
  logic [PC_W-1:0] irq_vec;
  logic [1:0]      pending;
  logic [$clog2(LOOP_LEVELS):0] depth;

  // decoded fields
  seq_op_e  op;
  tp_mem_e  mem_op;
  tp_move_e mv;
  logic     wb, half;
  logic [3:0] ra, rb;
  assign op     = seq_op_e'(instr[23:21]);
  assign mem_op = tp_mem_e'(instr[20:19]);
  assign wb     = instr[18];
  assign ra     = instr[17:14];
  assign rb     = instr[13:10];
  assign mv     = tp_move_e'(instr[9:7]);
  assign half   = instr[6];

  // FIFO and video status
  word_t tocp_wdata, fromcp_rdata, vin_word, stg_half;
  logic  tocp_full, fromcp_empty, vin_full, vin_irq;
  logic  tocp_push, fromcp_pop;

  logic rd_vin, wr_tocp, rd_fromcp;
  always_comb begin
    rd_vin    = (mv == MV_VIN2CP) || (mv == MV_VIN2STG);
    wr_tocp   = (mv == MV_STG2CP) || (mv == MV_VIN2CP);
    rd_fromcp = (mv == MV_CP2STG) || (mv == MV_CP2VOUT);
    stalled   = running && (op == OP_EXEC) &&
                ((rd_vin && !vin_full) || (wr_tocp && tocp_full) ||
                 (rd_fromcp && fromcp_empty));
  end

  wire ex   = issue && (op == OP_EXEC);
  wire conf = issue && (op == OP_CONF);

  prog_ram #(.DEPTH(TP_PROG_DEPTH), .WIDTH(INSTR_W), .AW(PC_W)) u_ram (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_wdata),
    .raddr(pc), .rdata(instr));

  useq #(.LEVELS(LOOP_LEVELS)) u_seq (
    .clk, .rst_n, .start, .instr, .stall(stalled), .irq_valid, .irq_vec,
    .irq_ack, .pc, .issue, .running, .in_isr, .depth);

  irq_ctrl u_irq (
    .clk, .rst_n, .req({eol, vin_irq}), .mask_we(conf && instr[20]),
    .mask_d(instr[1:0]), .ack(irq_ack), .irq_valid, .irq_vec, .pending);

  addr_unit u_au (
    .clk, .rst_n, .ra, .rb, .wb(ex && wb), .ld(conf && !instr[20]),
    .ld_reg(instr[19:16]), .ld_val(instr[15:0]), .addr(mem_addr));

  assign mem_we = ex && (mem_op == MEM_WRITE);
  assign mem_re = ex && (mem_op == MEM_READ);

  // 16-bit move datapath
  word_t move_src;
  always_comb begin
    unique case (mv)
      MV_STG2CP, MV_STG2VOUT: move_src = stg_half;
      MV_CP2STG, MV_CP2VOUT:  move_src = fromcp_rdata;
      default:                move_src = vin_word;
    endcase
  end
  assign tocp_wdata = move_src;
  assign tocp_push  = ex && wr_tocp;
  assign fromcp_pop = ex && rd_fromcp;

  tp_format u_fmt (
    .clk, .rst_n,
    .mem_load(mem_re), .mem_rdata,
    .half_we(ex && (mv == MV_CP2STG || mv == MV_VIN2STG)), .half,
    .half_wdata(move_src), .half_rdata(stg_half), .staging(mem_wdata),
    .vin_data, .vin_valid, .vin_ready, .vin_take(ex && rd_vin),
    .vin_word, .vin_full, .vin_irq,
    .vout_we(ex && (mv == MV_CP2VOUT || mv == MV_STG2VOUT)),
    .vout_wdata(move_src), .vout_data, .vout_valid);

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_tocp (
    .clk, .rst_n, .push(tocp_push), .wdata(tocp_wdata), .pop(cp_fin_pop),
    .rdata(cp_fin_data), .empty(cp_fin_empty), .full(tocp_full), .count());

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fromcp (
    .clk, .rst_n, .push(cp_fout_push), .wdata(cp_fout_data), .pop(fromcp_pop),
    .rdata(fromcp_rdata), .empty(fromcp_empty), .full(cp_fout_full), .count());
endmodule
