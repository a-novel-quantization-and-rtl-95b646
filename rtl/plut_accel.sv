// plut_accel: P-LUT 3x3 convolution accelerator for 4-bit power-of-two
// quantized networks.
//
// Weights and activations are 4-bit sign/magnitude codes that index a
// shared set of eight power-of-two-sum levels. Instead of multiplying, the
// accelerator reads each product from a 36-entry product look-up table
// (P-LUT) and adds: 64 3x3 convolutions (8 output x 8 input channels) are
// evaluated per clock. Weights arrive compressed in the signed-Huffman
// (S-Huff) format and are decoded on chip into a double-banked weight
// buffer, from their own stream and in the background, so the next tile
// is decoded while the current pass computes; activations arrive one pixel
// (8 channels x 4 bits) per 32-bit word, pass a double input buffer and a line buffer, and the outputs are
// scaled by a power-of-two shift, re-quantized to 4-bit codes (or sent as
// raw 32-bit sums) and leave through a double output buffer.
//
// Data path:
//   s_wt_* -> shuff_decoder -> weight_buffer (shadow bank) -> plut_complex
//   s_*    -> pingpong_buffer (input) -> line_buffer -> plut_complex
//   plut_complex -> out_stage (act_quantizer x8) -> pingpong_buffer -> m_*
// Control: axil_regs (AXI4-Lite) -> accel_ctrl; plut_table is written
// through the registers and broadcast to all 64 convolution units.
//
// Interface: AXI4-Lite control port (register map in plut_pkg); a 32-bit
// weight stream carrying, per load command, WWORDS words of one S-Huff
// tile; a 32-bit pixel stream carrying, per pass, W*H pixels in raster
// order, ending with s_last (it releases the partly filled last bank of
// the input buffer); a 32-bit output
// stream with m_last on the final word of the pass; irq pulses when a pass
// is done.
// Timing: with the quantized output one window per clock once the line
// buffer is primed (W*H cycles per pass plus pipeline and buffer latency);
// with raw output eight clocks per output pixel. A weight tile takes about
// 576 clocks to decode, hidden behind the previous pass when it is loaded
// while that pass runs.
//
// Some sub-block outputs are left unconnected on purpose: the input
// buffer's last flag and bank-change pulse (the controller counts pixels),
// the decoder's busy flag (the controller tracks the decode itself), the
// active weight bank, the output buffer's bank-change pulse and the
// quantizer's clip counter; they are observation points for simulation.
//
// The building blocks (P-LUT complex, S-Huff decoder, double line buffers,
// double input/output buffers, controller, AXI) and their sizes follow the
// accelerator description; the stream formats, register map and the way
// the blocks hand over, including the separate weight stream, are this
// design's choices.
module plut_accel
  import plut_pkg::*;
#(
  parameter int unsigned W_MAX      = 58,
  parameter int unsigned IBUF_DEPTH = 64,
  parameter int unsigned OBUF_DEPTH = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite control
  input  logic [11:0]       s_axil_awaddr,
  input  logic              s_axil_awvalid,
  output logic              s_axil_awready,
  input  logic [31:0]       s_axil_wdata,
  input  logic              s_axil_wvalid,
  output logic              s_axil_wready,
  output logic [1:0]        s_axil_bresp,
  output logic              s_axil_bvalid,
  input  logic              s_axil_bready,
  input  logic [11:0]       s_axil_araddr,
  input  logic              s_axil_arvalid,
  output logic              s_axil_arready,
  output logic [31:0]       s_axil_rdata,
  output logic [1:0]        s_axil_rresp,
  output logic              s_axil_rvalid,
  input  logic              s_axil_rready,
  // weight stream (from DMA): S-Huff words
  input  logic [BUS_W-1:0]  s_wt_data,
  input  logic              s_wt_valid,
  output logic              s_wt_ready,
  // pixel stream (from DMA)
  input  logic [BUS_W-1:0]  s_data,
  input  logic              s_valid,
  input  logic              s_last,
  output logic              s_ready,
  // output stream (to DMA)
  output logic [BUS_W-1:0]  m_data,
  output logic              m_valid,
  output logic              m_last,
  input  logic              m_ready,
  output logic              irq
);

  localparam int unsigned LB_W = $clog2(W_MAX) + 1;

  // ---- configuration ------------------------------------------------------
  logic              start, new_tile, load, raw, stride2;
  logic [15:0]       width, height, wwords;
  logic signed [5:0] shift;
  logic [2:0]        hcount [1:HLMAX];
  logic [IDX_W-1:0]  hsym   [HLMAX];
  lut_entry_t        levels [NLEV];
  logic              lut_we;
  logic [5:0]        lut_waddr;
  lut_entry_t        lut_wdata;
  lut_entry_t        lut_q  [LUT_N];
  logic              busy, loading, pending, done;
  logic [31:0]       out_count;

  axil_regs u_regs (
    .clk, .rst_n,
    .awaddr (s_axil_awaddr),  .awvalid (s_axil_awvalid), .awready (s_axil_awready),
    .wdata  (s_axil_wdata),   .wvalid  (s_axil_wvalid),  .wready  (s_axil_wready),
    .bresp  (s_axil_bresp),   .bvalid  (s_axil_bvalid),  .bready  (s_axil_bready),
    .araddr (s_axil_araddr),  .arvalid (s_axil_arvalid), .arready (s_axil_arready),
    .rdata  (s_axil_rdata),   .rresp   (s_axil_rresp),   .rvalid  (s_axil_rvalid),
    .rready (s_axil_rready),
    .start, .new_tile, .load, .raw, .width, .height, .stride2, .shift, .wwords, .hcount, .hsym,
    .levels, .lut_we, .lut_waddr, .lut_wdata, .lut_q,
    .busy, .loading, .pending, .done_pulse (done), .out_count
  );

  plut_table u_lut (
    .clk, .rst_n, .we (lut_we), .waddr (lut_waddr), .wdata (lut_wdata), .lut_q
  );

  // ---- input double buffer and routing -------------------------------------
  logic [BUS_W-1:0] in_data;
  logic             in_valid, in_ready, in_last, in_swap;

  pingpong_buffer #(.DW(BUS_W), .DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk, .rst_n,
    .s_data, .s_valid, .s_last, .s_ready,
    .m_data (in_data), .m_valid (in_valid), .m_last (in_last), .m_ready (in_ready),
    .swap (in_swap)
  );

  logic to_lb, lb_ready;
  assign in_ready = to_lb && lb_ready;

  // ---- weights: S-Huff decoder -> double weight buffer -------------------
  logic        dec_start, dec_done, dec_busy, w_valid, wb_swap, wb_bank;
  logic [9:0]  w_addr;
  code_t       w_code;
  code_t       w_tile [OUT_CH][IN_CH][KK];

  shuff_decoder u_dec (
    .clk, .rst_n, .start (dec_start), .nwords (wwords), .hcount, .hsym,
    .s_data (s_wt_data), .s_valid (s_wt_valid), .s_ready (s_wt_ready),
    .w_valid, .w_addr, .w_code, .done (dec_done), .busy (dec_busy)
  );

  weight_buffer u_wbuf (
    .clk, .rst_n, .we (w_valid), .waddr (w_addr), .wcode (w_code),
    .swap (wb_swap), .w_tile, .active_bank (wb_bank)
  );

  // ---- features: line buffer -> P-LUT complex -> output stage -------------
  logic  pipe_en, lb_clear, win_valid, cx_valid, res_last, out_last_sent;
  code_t win [IN_CH][KK];
  acc_t  psum [OUT_CH];
  logic [31:0] clip_cnt;
  logic [BUS_W-1:0] o_data;
  logic  o_valid, o_last, o_ready, out_swap;

  line_buffer #(.W_MAX(W_MAX)) u_lb (
    .clk, .rst_n, .clear (lb_clear),
    .width (LB_W'(width)), .stride2, .en (pipe_en),
    .pix_valid (in_valid && to_lb), .pix_data (in_data), .pix_ready (lb_ready),
    .win, .win_valid
  );

  plut_complex u_cx (
    .clk, .rst_n, .en (pipe_en), .vin (win_valid), .lut (lut_q),
    .w (w_tile), .win, .psum, .vout (cx_valid)
  );

  out_stage u_out (
    .clk, .rst_n, .raw, .shift, .levels,
    .vin (cx_valid), .psum, .last_in (res_last), .can_accept (pipe_en),
    .o_data, .o_valid, .o_last, .o_ready, .clip_cnt
  );

  pingpong_buffer #(.DW(BUS_W), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk, .rst_n,
    .s_data (o_data), .s_valid (o_valid), .s_last (o_last), .s_ready (o_ready),
    .m_data, .m_valid, .m_last, .m_ready,
    .swap (out_swap)
  );

  assign out_last_sent = o_valid && o_ready && o_last;

  // ---- controller ----------------------------------------------------------
  accel_ctrl u_ctrl (
    .clk, .rst_n, .start, .new_tile, .load, .width, .height, .stride2,
    .dec_start, .dec_done, .swap (wb_swap), .lb_clear, .to_lb,
    .pix_take (in_valid && to_lb && lb_ready),
    .res_take (cx_valid && pipe_en),
    .res_last, .out_last_sent, .busy, .loading, .pending, .done, .out_count
  );

  assign irq = done;

endmodule
