// out_stage: output formatter between the P-LUT complex and the output
// buffer.
//
// Takes the eight partial sums of one output pixel and emits them in one of
// two modes. In quantized mode every sum goes through an act_quantizer and
// the eight 4-bit codes are packed into one 32-bit word (channel oc in bits
// 4*oc+3 .. 4*oc), the same format the accelerator reads, so a layer's
// output can be fed back as the next layer's input. In raw mode the eight
// 32-bit sums are sent as eight words, for passes whose input channels
// exceed eight and whose partial sums are added by the host.
//
// Interface: vin/psum/last_in from the pipeline, raw, shift and levels from
// the registers; o_data/o_valid/o_last/o_ready to the output buffer;
// can_accept is the pipeline enable (the stage can take a pixel this
// cycle); clip_cnt counts quantized values that hit the clipping level.
// Timing: one pixel per cycle in quantized mode, one pixel per eight cycles
// in raw mode (the pipeline stalls meanwhile); data are registered.
//
// Quantizing activations in hardware on the fly follows the document; the
// raw mode, the packing and the clip counter are this design's choices.
module out_stage
  import plut_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              raw,
  input  logic signed [5:0] shift,
  input  lut_entry_t        levels [NLEV],
  input  logic              vin,
  input  acc_t              psum [OUT_CH],
  input  logic              last_in,
  output logic              can_accept,
  output logic [BUS_W-1:0]  o_data,
  output logic              o_valid,
  output logic              o_last,
  input  logic              o_ready,
  output logic [31:0]       clip_cnt
);

  code_t            q    [OUT_CH];
  logic             clip [OUT_CH];
  logic [BUS_W-1:0] word [OUT_CH];
  logic [3:0]       cnt_q;
  logic [2:0]       sel_q;
  logic             last_q;
  logic [BUS_W-1:0] packed_w;
  logic [3:0]       nclip;

  for (genvar oc = 0; oc < int'(OUT_CH); oc++) begin : g_q
    act_quantizer u_q (.psum(psum[oc]), .shift, .levels, .code(q[oc]), .clip(clip[oc]));
  end

  always_comb begin
    nclip = '0;
    for (int oc = 0; oc < int'(OUT_CH); oc++) begin
      packed_w[oc*4 +: 4] = q[oc];
      nclip = nclip + 4'(clip[oc]);
    end
  end

  assign can_accept = (cnt_q == 0) || (cnt_q == 4'd1 && o_ready);
  assign o_valid    = (cnt_q != 0);
  assign o_data     = word[sel_q];
  assign o_last     = last_q && (cnt_q == 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      sel_q    <= '0;
      last_q   <= 1'b0;
      clip_cnt <= '0;
      for (int oc = 0; oc < int'(OUT_CH); oc++) word[oc] <= '0;
    end else begin
      if (o_valid && o_ready) begin
        cnt_q <= cnt_q - 1'b1;
        sel_q <= sel_q + 1'b1;
      end
      if (vin && can_accept) begin
        last_q <= last_in;
        sel_q  <= '0;
        if (raw) begin
          cnt_q <= 4'(OUT_CH);
          for (int oc = 0; oc < int'(OUT_CH); oc++) word[oc] <= BUS_W'(psum[oc]);
        end else begin
          cnt_q    <= 4'd1;
          word[0]  <= packed_w;
          clip_cnt <= clip_cnt + 32'(nclip);
        end
      end
    end
  end

endmodule
