// tp_format - word format conversion and video ports of the transfer
// processor.
//
// The data memory has 32-bit words to halve the access rate, while the
// computation processor works on 16-bit words. A 32-bit staging register sits
// between the two: a memory read loads it whole, a memory write stores it
// whole, and each half can be read out to or written from the 16-bit side
// (`half` 0 = bits 15:0, 1 = bits 31:16). The module also holds the video
// input register (one word, with a valid/ready handshake; the arrival of a
// word raises the data-input interrupt request) and the registered video
// output. A word offered while the input register is full is refused
// (vin_ready low). The published design states only that the TP converts
// between memory and CP words; the staging register is this design's way
// of doing it.
module tp_format
  import sbc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // staging register
  input  logic             mem_load,    // staging <= mem_rdata
  input  logic [MEM_W-1:0] mem_rdata,
  input  logic             half_we,     // staging[half] <= half_wdata
  input  logic             half,
  input  word_t            half_wdata,
  output word_t            half_rdata,  // staging[half]
  output logic [MEM_W-1:0] staging,
  // video input
  input  word_t            vin_data,
  input  logic             vin_valid,
  output logic             vin_ready,
  input  logic             vin_take,    // consume the input word
  output word_t            vin_word,
  output logic             vin_full,
  output logic             vin_irq,     // pulse: a word arrived
  // video output
  input  logic             vout_we,
  input  word_t            vout_wdata,
  output word_t            vout_data,
  output logic             vout_valid
);
  assign half_rdata = half ? staging[31:16] : staging[15:0];
  assign vin_ready  = !vin_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      staging    <= '0;
      vin_word   <= '0;
      vin_full   <= 1'b0;
      vin_irq    <= 1'b0;
      vout_data  <= '0;
      vout_valid <= 1'b0;
    end else begin
      if (mem_load)
        staging <= mem_rdata;
      else if (half_we) begin
        if (half) staging[31:16] <= half_wdata;
        else      staging[15:0]  <= half_wdata;
      end
      vin_irq <= 1'b0;
      if (vin_valid && !vin_full) begin
        vin_word <= vin_data;
        vin_full <= 1'b1;
        vin_irq  <= 1'b1;
      end else if (vin_take) begin
        vin_full <= 1'b0;
      end
      vout_valid <= vout_we;
      if (vout_we) vout_data <= vout_wdata;
    end
  end
endmodule
