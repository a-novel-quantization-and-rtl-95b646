// plut_conv3x3: one 3x3 convolution unit of the P-LUT complex.
//
// Computes sum over the nine taps of w[t]*a[t], where both operands are
// 4-bit sign/magnitude codes. No multiplier is used: each product is one
// indexing of the shared P-LUT (magnitude) plus a sign flip, and the nine
// signed products go through an adder tree.
//
// Interface: the whole P-LUT (lut), nine weight codes (w), nine activation
// codes of one window of one input channel (a), a valid flag and a pipeline
// enable. Taps are numbered row-major, t = 3*ky + kx.
// Timing: two pipeline stages (products, then the adder tree), one window
// per enabled cycle; sum/vout appear two enabled cycles after the inputs.
// While en is low every register holds its value (stall).
//
// Indexing plus addition instead of multiplication follows the P-LUT
// scheme; the two-stage split is this design's choice.
module plut_conv3x3
  import plut_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       vin,
  input  lut_entry_t lut [LUT_N],
  input  code_t      w   [KK],
  input  code_t      a   [KK],
  output acc_t       sum,
  output logic       vout
);

  acc_t prod_q [KK];
  logic v1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < int'(KK); t++) prod_q[t] <= '0;
      v1_q <= 1'b0;
      sum  <= '0;
      vout <= 1'b0;
    end else if (en) begin
      for (int t = 0; t < int'(KK); t++) prod_q[t] <= lut_product(lut, w[t], a[t]);
      v1_q <= vin;
      sum  <= ((prod_q[0] + prod_q[1]) + (prod_q[2] + prod_q[3])) +
              ((prod_q[4] + prod_q[5]) + (prod_q[6] + prod_q[7])) + prod_q[8];
      vout <= v1_q;
    end
  end

endmodule
