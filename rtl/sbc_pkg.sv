// sbc_pkg - shared sizes, microinstruction formats and encoder functions of
// the bi-processor subband coder.
//
// The chip has two microprogrammed processors: the transfer processor (TP),
// which moves data between the external 32-bit data memory, the video ports
// and the computation processor, and the computation processor (CP), which
// runs the lattice filter arithmetic. Both have 24-bit microinstructions and
// share one sequencer design with four nested hardware loops.
//
// Widths that follow the published design: 16-bit CP data words, 32-bit
// memory words, 16-bit memory addresses, 24-bit microinstructions, TP and CP
// program RAMs of 256 and 160 words, 16-word FIFOs, 16-word register files,
// 8-bit lattice coefficients, 24-bit lattice accumulation, 10-bit scaling
// coefficients and four loop levels. The bit-level instruction formats below
// are this design's own: the published description does not give them.
//
// Common instruction layout: bits [23:21] hold the sequencer opcode.
//   OP_EXEC  : one cycle of datapath work, fields in [20:0]
//   OP_CONF  : configuration/immediate write, fields in [20:0]
//   OP_LOOP  : [15:8] iteration count (0 behaves as 1), [7:0] last body address
//   OP_JUMP  : [7:0] target
//   OP_RETI  : return from interrupt (TP)
//   OP_HALT  : stop and raise the halted flag
package sbc_pkg;

  localparam int DATA_W      = 16;   // CP word
  localparam int MEM_W       = 32;   // data memory word
  localparam int ADDR_W      = 16;   // data memory address
  localparam int INSTR_W     = 24;   // microinstruction
  localparam int PC_W        = 8;
  localparam int TP_PROG_DEPTH = 256;
  localparam int CP_PROG_DEPTH = 160;
  localparam int FIFO_DEPTH  = 16;
  localparam int RF_DEPTH    = 16;
  localparam int LOOP_LEVELS = 4;
  localparam int RHO_W       = 8;    // lattice coefficient (Q2.6, own choice)
  localparam int RHO_FRAC    = 6;
  localparam int ACC_W       = 24;   // lattice accumulation
  localparam int SCL_W       = 10;   // scaling coefficient (Q2.8, own choice)
  localparam int SCL_FRAC    = 8;
  localparam int RHO_BANK    = 8;    // rho_i bank entries (own choice)
  localparam int SHIFT_BANK  = 8;    // shifts bank entries (own choice)
  localparam int SCL_BANK    = 4;    // scaling coefficient entries (own choice)

  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [DATA_W-1:0]  word_t;

  typedef enum logic [2:0] {
    OP_EXEC = 3'd0,
    OP_CONF = 3'd1,
    OP_LOOP = 3'd2,
    OP_JUMP = 3'd3,
    OP_RETI = 3'd4,
    OP_HALT = 3'd5
  } seq_op_e;

  // ---------------------------------------------------------------------
  // TP formats
  //   EXEC: [20:19] memory op, [18] address write-back, [17:14] ra,
  //         [13:10] rb, [9:7] move, [6] staging half (0 low, 1 high)
  //         address = rf[ra] + rf[rb]; write-back stores it into rf[ra]
  //   CONF: [20]=0 load immediate: [19:16] register, [15:0] value
  //         [20]=1 interrupt enable: [1:0] mask
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    MEM_NONE  = 2'd0,
    MEM_READ  = 2'd1,   // staging <= memory word
    MEM_WRITE = 2'd2    // memory word <= staging
  } tp_mem_e;

  typedef enum logic [2:0] {
    MV_NONE    = 3'd0,
    MV_STG2CP  = 3'd1,  // staging half -> FIFO to CP
    MV_CP2STG  = 3'd2,  // FIFO from CP -> staging half
    MV_VIN2CP  = 3'd3,  // video input -> FIFO to CP
    MV_CP2VOUT = 3'd4,  // FIFO from CP -> video output
    MV_VIN2STG = 3'd5,  // video input -> staging half
    MV_STG2VOUT= 3'd6   // staging half -> video output
  } tp_move_e;

  function automatic instr_t tp_exec(tp_mem_e mem, logic wb, logic [3:0] ra,
                                     logic [3:0] rb, tp_move_e mv, logic half);
    return {OP_EXEC, mem, wb, ra, rb, mv, half, 6'd0};
  endfunction

  function automatic instr_t tp_ldi(logic [3:0] r, logic [15:0] v);
    return {OP_CONF, 1'b0, r, v};
  endfunction

  function automatic instr_t tp_ien(logic [1:0] mask);
    return {OP_CONF, 1'b1, 18'd0, mask};
  endfunction

  // ---------------------------------------------------------------------
  // Sequencer instructions (both processors)
  // ---------------------------------------------------------------------
  function automatic instr_t seq_loop(logic [7:0] count, logic [7:0] last);
    return {OP_LOOP, 5'd0, count, last};
  endfunction
  function automatic instr_t seq_jump(logic [7:0] target);
    return {OP_JUMP, 13'd0, target};
  endfunction
  function automatic instr_t seq_reti();
    return {OP_RETI, 21'd0};
  endfunction
  function automatic instr_t seq_halt();
    return {OP_HALT, 21'd0};
  endfunction

  // ---------------------------------------------------------------------
  // CP network: sources and destinations, 3 buses of two segments each.
  // Segment 0 is the FIFO side (FIFOs, VF), segment 1 the far side
  // (multiplier, adder-subtractor, HF).
  // ---------------------------------------------------------------------
  localparam int NBUS = 3;
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,
    SRC_FIN  = 3'd1,    // head of FIFO TP->CP
    SRC_VF   = 3'd2,
    SRC_MUL  = 3'd3,
    SRC_ADD  = 3'd4,
    SRC_HF   = 3'd5
  } cp_src_e;

  typedef enum logic [2:0] {
    DST_FOUT = 3'd0,    // FIFO CP->TP
    DST_VF   = 3'd1,
    DST_MUL  = 3'd2,
    DST_ADDA = 3'd3,
    DST_ADDB = 3'd4,
    DST_HF   = 3'd5
  } cp_dst_e;
  localparam int NDST = 6;

  // Destination connection code: 0..2 = bus number, 3 = direct link
  // (adder operands A and B <- HF, HF input <- adder; others: none).
  localparam logic [1:0] LINK_DIRECT = 2'd3;

  function automatic logic src_side(cp_src_e s);
    return (s == SRC_MUL) || (s == SRC_ADD) || (s == SRC_HF);
  endfunction
  function automatic logic dst_side(cp_dst_e d);
    return (d == DST_MUL) || (d == DST_ADDA) || (d == DST_ADDB) || (d == DST_HF);
  endfunction

  typedef struct packed {
    logic    split;
    cp_src_e drv0;      // drives segment 0, or the whole bus when joined
    cp_src_e drv1;      // drives segment 1 when split
  } bus_cfg_t;

  // ---------------------------------------------------------------------
  // Lattice resource (VF/HF) per-cycle control
  // ---------------------------------------------------------------------
  typedef struct packed {
    logic x_ld;         // load the input register
    logic x_from_rf;    // input register source: 0 bus, 1 own register file
    logic add_delay;    // adder operand: 0 input register, 1 two-cycle delay
    logic rho_nxt;      // advance the coefficient pointer after this cycle
    logic rf_we;        // write the output into the register file
    logic rd_nxt;       // advance the register file read pointer
  } pe_ctl_t;

  // ---------------------------------------------------------------------
  // CP formats
  //   EXEC: [20:15] VF control, [14:9] HF control, [8] adder load A,
  //         [7:6] adder op, [5] multiplier load, [4:3] scaling coefficient,
  //         [2] pop FIFO TP->CP, [1] push FIFO CP->TP, [0] unused
  //   CONF: [20:17] group, [16:13] index, [12:0] value
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    AS_NONE = 2'd0,
    AS_ADD  = 2'd1,     // A + B
    AS_SUB  = 2'd2,     // A - B
    AS_RSUB = 2'd3      // B - A
  } as_op_e;

  typedef enum logic [3:0] {
    CG_VF_RHO   = 4'd0,
    CG_VF_SHIFT = 4'd1,
    CG_HF_RHO   = 4'd2,
    CG_HF_SHIFT = 4'd3,
    CG_SCALE    = 4'd4,
    CG_VF_CFG   = 4'd5,  // value[2:0] last rho index, [3] out_delay,
                         // [4] split register file, [8:5] feedback offset,
                         // [11:9] index of the final cross-section
    CG_HF_CFG   = 4'd6,
    CG_VF_PTR   = 4'd7,  // index: write pointer, value[3:0]: read pointer,
                         // [7:4] feedback read pointer, [11:8] final write pointer
    CG_HF_PTR   = 4'd8,
    CG_BUS      = 4'd9,  // index: bus, value[6]: split, [5:3] drv0, [2:0] drv1
    CG_DST      = 4'd10  // index: destination, value[1:0]: connection code
  } cp_cfg_e;

  typedef struct packed {
    pe_ctl_t vf;
    pe_ctl_t hf;
    logic    add_lda;
    as_op_e  add_op;
    logic    mul_ld;
    logic [1:0] mul_coef;
    logic    fin_pop;
    logic    fout_push;
    logic    spare;
  } cp_exec_t;

  function automatic instr_t cp_exec(cp_exec_t f);
    return {OP_EXEC, f};
  endfunction
  function automatic instr_t cp_conf(cp_cfg_e g, logic [3:0] idx, logic [12:0] v);
    return {OP_CONF, g, idx, v};
  endfunction

endpackage
