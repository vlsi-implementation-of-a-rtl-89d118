// lattice_pe - one lattice filter resource of the computation processor;
// instantiated twice, as VF (vertical filtering) and HF (horizontal filtering).
//
// A lattice cross-section computes out_up = inp_up + rho*inp_low and
// out_low = inp_low + rho*inp_up. The resource does this in two successive
// cycles with one 8x16 multiplier and one 24-bit adder, as in the published
// resource diagram:
//
//   bus / own register file -> input register X
//   X -> multiplier (x rho[ptr]) -> product register P          (24 bits)
//   X -> two-register delay D1, D2; a mux picks X or D2, which is
//        aligned to the product and sign-extended to 24 bits
//   adder: operand + P -> sum register S                         (24 bits)
//   S -> barrel shifter (right shift from the shifts bank) -> 16 bits
//   -> mux (direct, or through a two-register delay) -> register file
//      (16 words x 16 bits) -> bus and back to the input mux
//
// Schedule of one cross-section (instruction cycles c0..c4):
//   c0: x_ld with inp_low          c1: x_ld with inp_up
//   c2: add_delay=0 (S <= inp_up + rho*inp_low)
//   c3: add_delay=1 (S <= inp_low + rho*inp_up), rf_we stores out_up
//   c4: rf_we stores out_low
// so a cross-section occupies the unit for two cycles, and an L-tap filter
// (N = L/2-1 cross-sections) takes L-2 cycles per output pair.
//
// All pipeline registers advance only when `en` is high (the CP is not
// stalled). The coefficient pointer selects rho[ptr]; the shift for a result
// is taken from the shifts bank at the same index, carried along the pipe.
// Register file writes use a write pointer and reads a read pointer, each
// post-incremented (mod 16); the microprogram sets both with ptr_we.
//
// To run all cross-sections of one filter on one resource at a new section
// every two cycles, the register file can be split. Results of the final
// cross-section (coefficient index fin_idx) then go to the upper 8 words,
// through their own write pointer, and the bus reads them in order through
// the read pointer. All other results go to the lower 8 words. The feedback
// path reads these in pairs: the lower input at the feedback pointer, the
// upper input fb_off words further on, and after that the pointer advances
// by two. With a steady schedule, every section reads at the same distances
// behind the writes: for N sections, the lower input of section s+1 is
// low_s of the previous pair, and up_s of this pair is 2N-3 words after it.
// What follows the published diagram: the 8x16 multiplier, the 24-bit adder,
// sign extension, barrel shifter, rho and shifts banks, 16x16 register file
// and the two-register delays with bypass muxes. This design's own choices:
// Q2.6 coefficients (the addend is aligned by 6 bits before the add), an
// 8-entry rho bank and shifts bank, saturation of the shifter output to 16
// bits, pointer addressing of the register file and its split mode, a
// 24-bit sum that wraps.
module lattice_pe
  import sbc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  pe_ctl_t           ctl,
  input  word_t             bus_in,
  // configuration
  input  logic              rho_we,
  input  logic              shift_we,
  input  logic [2:0]        bank_idx,
  input  logic [RHO_W-1:0]  rho_val,
  input  logic [3:0]        shift_val,
  input  logic              cfg_we,
  input  logic              cfg_out_delay,
  input  logic [2:0]        cfg_rho_last,
  input  logic              cfg_split,
  input  logic [3:0]        cfg_fb_off,
  input  logic [2:0]        cfg_fin_idx,
  input  logic              ptr_we,
  input  logic [3:0]        ptr_wp,
  input  logic [3:0]        ptr_rp,
  input  logic [3:0]        ptr_rpf,
  input  logic [3:0]        ptr_wpo,
  // result
  output word_t             rf_out
);
  logic signed [RHO_W-1:0]  rho  [RHO_BANK];
  logic        [3:0]        shf  [SHIFT_BANK];
  word_t                    rf   [RF_DEPTH];

  logic signed [DATA_W-1:0] x, d1, d2;
  logic signed [ACC_W-1:0]  p, s;
  logic [2:0]               ptr, idx_p, idx_s, rho_last, fin_idx, oi1, oi2;
  logic                     out_delay, split, fb_phase;
  logic [3:0]               fb_off;
  word_t                    o1, o2;
  logic [3:0]               wp, rp, rpf, wpo;

  // register file addressing. Unified mode: one write pointer, and one read
  // pointer for both the bus and the feedback path. Split mode: results of
  // cross-section fin_idx go to the upper half (write pointer wpo, read on
  // the bus through rp); all other results go to the lower half (write
  // pointer wp), which the feedback path reads in pairs: rf[rpf] for the
  // lower input, rf[rpf + fb_off] for the upper one, after which rpf
  // advances by two.
  logic [3:0] rd_bus, rd_fb, wr_addr;
  logic [2:0] out_idx;
  logic       wr_fin;
  always_comb begin
    rd_bus  = split ? {1'b1, rp[2:0]} : rp;
    rd_fb   = !split ? rp :
              fb_phase ? {1'b0, 3'(rpf[2:0] + fb_off[2:0])} : {1'b0, rpf[2:0]};
    out_idx = out_delay ? oi2 : idx_s;
    wr_fin  = split && (out_idx == fin_idx);
    wr_addr = !split ? wp : wr_fin ? {1'b1, wpo[2:0]} : {1'b0, wp[2:0]};
  end

  assign rf_out = rf[rd_bus];

  // adder operand: sign extension with alignment to the Q2.6 product
  logic signed [DATA_W-1:0] opnd;
  logic signed [ACC_W-1:0]  opnd_ext, sum;
  always_comb begin
    opnd     = ctl.add_delay ? d2 : x;
    opnd_ext = ACC_W'(opnd) <<< RHO_FRAC;
    sum      = opnd_ext + p;
  end

  // barrel shifter with saturation to the 16-bit pixel width
  logic signed [ACC_W-1:0] sh;
  word_t                   shq, out_w;
  always_comb begin
    sh = s >>> shf[idx_s];
    if (sh > ACC_W'(32767))       shq = 16'h7FFF;
    else if (sh < -ACC_W'(32768)) shq = 16'h8000;
    else                          shq = sh[DATA_W-1:0];
    out_w = out_delay ? o2 : shq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RHO_BANK; i++)   rho[i] <= '0;
      for (int i = 0; i < SHIFT_BANK; i++) shf[i] <= '0;
      for (int i = 0; i < RF_DEPTH; i++)   rf[i]  <= '0;
      {x, d1, d2, o1, o2} <= '0;
      {p, s} <= '0;
      {ptr, idx_p, idx_s, rho_last, fin_idx, oi1, oi2} <= '0;
      {out_delay, split, fb_phase} <= '0;
      fb_off <= '0;
      {wp, rp, rpf, wpo} <= '0;
    end else begin
      if (rho_we)   rho[bank_idx] <= rho_val;
      if (shift_we) shf[bank_idx] <= shift_val;
      if (cfg_we) begin
        out_delay <= cfg_out_delay;
        rho_last  <= cfg_rho_last;
        split     <= cfg_split;
        fb_off    <= cfg_fb_off;
        fin_idx   <= cfg_fin_idx;
        ptr       <= '0;
      end
      if (ptr_we) begin
        wp       <= ptr_wp;
        rp       <= ptr_rp;
        rpf      <= ptr_rpf;
        wpo      <= ptr_wpo;
        fb_phase <= 1'b0;
      end
      if (en) begin
        if (ctl.x_ld) x <= ctl.x_from_rf ? rf[rd_fb] : bus_in;
        if (ctl.x_ld && ctl.x_from_rf && split) begin
          fb_phase <= !fb_phase;
          if (fb_phase) rpf <= rpf + 4'd2;
        end
        d1    <= x;
        d2    <= d1;
        p     <= rho[ptr] * x;
        idx_p <= ptr;
        s     <= sum;
        idx_s <= idx_p;
        o1    <= shq;
        o2    <= o1;
        oi1   <= idx_s;
        oi2   <= oi1;
        if (ctl.rho_nxt) ptr <= (ptr == rho_last) ? '0 : ptr + 1'b1;
        if (ctl.rf_we) begin
          rf[wr_addr] <= out_w;
          if (wr_fin) wpo <= wpo + 1'b1;
          else        wp  <= wp + 1'b1;
        end
        if (ctl.rd_nxt) rp <= rp + 1'b1;
      end
    end
  end
endmodule
