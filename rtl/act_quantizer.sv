// act_quantizer: real-time activation quantizer of one output channel.
//
// Turns a 32-bit signed partial sum into the 4-bit sign/magnitude code of
// the next layer. First the integer-only power-of-two scale is applied as
// an arithmetic shift (shift > 0 shifts left, shift < 0 shifts right): all
// scale factors of the scheme are powers of two, so the product of the
// weight, activation and next-layer scales is one shift. The magnitude is
// then clipped to the largest level and projected to the nearest of the
// eight codebook levels (ties go to the larger level); the sign is kept
// apart, and a value that rounds to level 0 gets a positive sign.
//
// Interface: psum in, shift (signed), levels[0..7] (unsigned, same
// fixed-point format as the P-LUT, ascending, levels[0] = 0), code out and
// clip, high when the magnitude was above the largest level.
// Timing: purely combinational.
//
// The power-of-two scaling by shifting, the clipping and the projection to
// the nearest level follow the quantization description; nearest-level
// search by comparing with the seven midpoints is this design's choice.
module act_quantizer
  import plut_pkg::*;
(
  input  acc_t              psum,
  input  logic signed [5:0] shift,
  input  lut_entry_t        levels [NLEV],
  output code_t             code,
  output logic              clip
);

  logic signed [63:0] ext, scaled;
  logic [63:0]        mag;
  logic [IDX_W:0]     idx;
  logic [32:0]        mid;

  always_comb begin
    ext = 64'(psum);
    if (shift >= 0) scaled = ext <<< shift;
    else            scaled = ext >>> (-shift);
    mag = scaled[63] ? 64'(-scaled) : 64'(scaled);
    idx = '0;
    for (int i = 0; i < int'(NLEV) - 1; i++) begin
      mid = (33'(levels[i]) + 33'(levels[i+1]) + 33'd1) >> 1;
      if (mag >= 64'(mid)) idx = idx + 1'b1;
    end
    clip      = mag > 64'(levels[NLEV-1]);
    code.idx  = idx[IDX_W-1:0];
    code.sign = scaled[63] && (idx != 0);
  end

endmodule
