// weight_buffer: double-banked weight store of one 8x8x3x3 tile.
//
// Bank "active" feeds all 64 convolution units at once through w_tile;
// the S-Huff decoder writes decoded weights into the other (shadow) bank,
// so a new tile can be decoded while the current one is still in use.
// swap makes the shadow bank active.
//
// Interface: we/waddr/wcode write one weight of the shadow bank, waddr
// being the stream position (oc*8 + ic)*9 + tap; swap (pulse) exchanges the
// banks; w_tile[oc][ic][tap] is the active bank; active_bank shows which
// bank that is.
// Timing: writes and swap take effect at the next edge; w_tile follows the
// registers. Reset clears both banks (all-zero weights) and selects bank 0.
//
// A double buffer for weights follows the accelerator description; the
// register organisation and the write order are this design's choices.
module weight_buffer
  import plut_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [9:0] waddr,
  input  code_t      wcode,
  input  logic       swap,
  output code_t      w_tile [OUT_CH][IN_CH][KK],
  output logic       active_bank
);

  code_t bank [2][TILE_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < int'(TILE_W); i++) bank[b][i] <= '0;
      active_bank <= 1'b0;
    end else begin
      if (we && (waddr < 10'(TILE_W))) bank[~active_bank][waddr] <= wcode;
      if (swap) active_bank <= ~active_bank;
    end
  end

  always_comb begin
    for (int oc = 0; oc < int'(OUT_CH); oc++)
      for (int ic = 0; ic < int'(IN_CH); ic++)
        for (int t = 0; t < int'(KK); t++)
          w_tile[oc][ic][t] = bank[active_bank][(oc * int'(IN_CH) + ic) * int'(KK) + t];
  end

endmodule
