// cp_network - programmable interconnection network of the computation
// processor: three splittable buses.
//
// The CP resources (VF, HF, the 10x16 multiplier and the 16-bit adder-
// subtractor) and the two FIFOs exchange data over three 16-bit buses. Each
// bus runs past all units and can be opened in the middle: segment 0 serves
// the FIFO side (FIFO in, FIFO out, VF) and segment 1 the far side
// (multiplier, adder-subtractor, HF). Joined, a bus carries one transfer
// from any source to any destination; split, it carries two independent
// transfers, one per segment. With three buses, up to six transfers happen
// per cycle, which is what lets the four resources work in parallel.
// Besides the buses there is a direct link between the HF resource and the
// adder-subtractor in both directions (HF output to either adder operand,
// adder output to HF input).
//
// The routing is held in configuration registers written by the
// microprogram: per bus, a split bit and the source driving segment 0 (or the
// whole bus) and segment 1; per destination, which bus it listens to (0..2)
// or the direct link (3). Routing is purely combinational from the source
// outputs to the destination inputs. The three splittable buses and the
// HF/adder link follow the published design; the segment boundary, the
// register-based routing and its encoding are this design's own.
module cp_network
  import sbc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  word_t       src_fin,
  input  word_t       src_vf,
  input  word_t       src_mul,
  input  word_t       src_add,
  input  word_t       src_hf,
  input  logic        bus_we,
  input  logic [1:0]  bus_idx,
  input  bus_cfg_t    bus_val,
  input  logic        dst_we,
  input  logic [2:0]  dst_idx,
  input  logic [1:0]  dst_val,
  output word_t       dst [NDST],
  output word_t       seg [NBUS][2],
  output logic [NBUS-1:0] split_o
);
  bus_cfg_t   bcfg [NBUS];
  logic [1:0] dcfg [NDST];

  function automatic word_t pick(cp_src_e s, word_t fin, word_t vf, word_t mul,
                                 word_t add, word_t hf);
    unique case (s)
      SRC_FIN: return fin;
      SRC_VF:  return vf;
      SRC_MUL: return mul;
      SRC_ADD: return add;
      SRC_HF:  return hf;
      default: return '0;
    endcase
  endfunction

  always_comb begin
    for (int b = 0; b < NBUS; b++) begin
      split_o[b] = bcfg[b].split;
      seg[b][0]  = pick(bcfg[b].drv0, src_fin, src_vf, src_mul, src_add, src_hf);
      seg[b][1]  = bcfg[b].split ?
                   pick(bcfg[b].drv1, src_fin, src_vf, src_mul, src_add, src_hf) :
                   seg[b][0];
    end
    for (int d = 0; d < NDST; d++) begin
      if (dcfg[d] == LINK_DIRECT) begin
        if (cp_dst_e'(d) == DST_ADDA || cp_dst_e'(d) == DST_ADDB)
          dst[d] = src_hf;
        else if (cp_dst_e'(d) == DST_HF) dst[d] = src_add;
        else                             dst[d] = '0;
      end else begin
        dst[d] = seg[dcfg[d]][dst_side(cp_dst_e'(d))];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBUS; b++) bcfg[b] <= '0;
      for (int d = 0; d < NDST; d++) dcfg[d] <= '0;
    end else begin
      if (bus_we && bus_idx < 2'(NBUS)) bcfg[bus_idx] <= bus_val;
      if (dst_we && int'(dst_idx) < NDST) dcfg[dst_idx] <= dst_val;
    end
  end

  // a split bus must be driven from the side each segment is on
  for (genvar b = 0; b < NBUS; b++) begin : g_chk
    a_split_sides: assert property (@(posedge clk) disable iff (!rst_n)
      bcfg[b].split |-> (!src_side(bcfg[b].drv0) && (bcfg[b].drv1 == SRC_NONE ||
                          src_side(bcfg[b].drv1))));
  end
endmodule
