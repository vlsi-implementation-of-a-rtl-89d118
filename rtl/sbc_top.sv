// sbc_top - bi-processor architecture for generic subband (multiresolution)
// picture coding and decoding.
//
// Two independently sequenced processors share the work of a separable 2D
// lattice filter bank: the transfer processor (TP) moves pixels and
// intermediate results between the video ports, the external 32-bit data
// memory (which holds the line delays of the vertical filter) and the
// computation processor (CP), which does the arithmetic. Two 16-word FIFOs,
// inside the TP, pass 16-bit words between them and keep them in step; a
// processor that finds a FIFO empty or full stalls for as long as needed.
// The external host loads both microprogram RAMs through one shared port
// (`prog_sel` 0 = TP, 1 = CP) and then starts the processors.
//
// The data memory is an external asynchronous static RAM: mem_addr, mem_we
// and mem_wdata are valid during the access cycle and mem_rdata is sampled at
// its end. All logic runs on one clock (60 MHz in the published chip).
module sbc_top
  import sbc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // external host
  input  logic              prog_we,
  input  logic              prog_sel,
  input  logic [PC_W-1:0]   prog_addr,
  input  instr_t            prog_wdata,
  input  logic              tp_start,
  input  logic              cp_start,
  output logic              tp_running,
  output logic              cp_running,
  // external data memory
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_we,
  output logic              mem_re,
  output logic [MEM_W-1:0]  mem_wdata,
  input  logic [MEM_W-1:0]  mem_rdata,
  // video
  input  word_t             vin_data,
  input  logic              vin_valid,
  output logic              vin_ready,
  input  logic              eol,
  output word_t             vout_data,
  output logic              vout_valid,
  // status
  output logic              tp_stalled,
  output logic              cp_stalled,
  output logic [NBUS-1:0]   cp_bus_split
);
  word_t fin_data, fout_data;
  logic  fin_empty, fin_pop, fout_push, fout_full, cp_ex;

  tp_core u_tp (
    .clk, .rst_n,
    .prog_we(prog_we && !prog_sel), .prog_addr, .prog_wdata,
    .start(tp_start), .running(tp_running),
    .mem_addr, .mem_we, .mem_re, .mem_wdata, .mem_rdata,
    .vin_data, .vin_valid, .vin_ready, .eol, .vout_data, .vout_valid,
    .cp_fin_data(fin_data), .cp_fin_empty(fin_empty), .cp_fin_pop(fin_pop),
    .cp_fout_data(fout_data), .cp_fout_push(fout_push),
    .cp_fout_full(fout_full), .stalled(tp_stalled));

  cp_core u_cp (
    .clk, .rst_n,
    .prog_we(prog_we && prog_sel), .prog_addr, .prog_wdata,
    .start(cp_start), .running(cp_running),
    .fin_data, .fin_empty, .fin_pop, .fout_data, .fout_push, .fout_full,
    .stalled(cp_stalled), .bus_split(cp_bus_split), .exec_o(cp_ex));
endmodule
