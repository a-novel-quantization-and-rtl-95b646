// plut_complex: the core compute engine of the accelerator.
//
// Eight output-channel lanes, each with eight plut_conv3x3 units (one per
// input channel): 64 3x3 convolutions per cycle. The eight convolution
// results of a lane are added to give the partial sum of that output
// channel over the eight input channels of the pass. All 64 units index the
// same P-LUT.
//
// Interface: the P-LUT broadcast, the weight tile w[oc][ic][tap], one 3x3
// window of all eight input channels win[ic][tap], vin and a pipeline
// enable. Output: psum[oc] and vout.
// Timing: three stages (products, 3x3 adder tree, channel adder tree), one
// window per enabled cycle, results three enabled cycles after the window.
// en low freezes the whole pipeline.
//
// The 8x8 organisation and the 64 parallel 3x3 convolutions follow the
// accelerator description; reading "8 input/output channels, each channel
// processes 8 convolutions" as 8 output lanes of 8 input-channel units, and
// the pipeline depth, are this design's choices.
module plut_complex
  import plut_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       vin,
  input  lut_entry_t lut  [LUT_N],
  input  code_t      w    [OUT_CH][IN_CH][KK],
  input  code_t      win  [IN_CH][KK],
  output acc_t       psum [OUT_CH],
  output logic       vout
);

  acc_t conv_sum [OUT_CH][IN_CH];
  logic conv_v   [OUT_CH][IN_CH];

  for (genvar oc = 0; oc < int'(OUT_CH); oc++) begin : g_oc
    for (genvar ic = 0; ic < int'(IN_CH); ic++) begin : g_ic
      plut_conv3x3 u_conv (
        .clk, .rst_n, .en, .vin,
        .lut,
        .w    (w[oc][ic]),
        .a    (win[ic]),
        .sum  (conv_sum[oc][ic]),
        .vout (conv_v[oc][ic])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int oc = 0; oc < int'(OUT_CH); oc++) psum[oc] <= '0;
      vout <= 1'b0;
    end else if (en) begin
      for (int oc = 0; oc < int'(OUT_CH); oc++) begin
        acc_t s;
        s = '0;
        for (int ic = 0; ic < int'(IN_CH); ic++) s = s + conv_sum[oc][ic];
        psum[oc] <= s;
      end
      vout <= conv_v[0][0];
    end
  end

endmodule
