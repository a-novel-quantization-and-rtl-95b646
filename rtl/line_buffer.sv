// line_buffer: builds 3x3 windows of all eight input channels from a raster
// stream of pixels.
//
// Each input word is one pixel: eight 4-bit activation codes, channel ic in
// bits 4*ic+3 .. 4*ic. Two row memories hold the two previous image rows;
// when pixel (x, y) arrives, the column x of both rows and the new pixel
// are shifted into a 3x3 register window and the row memories move up by
// one row at that column. A window is output whenever its bottom-right
// pixel has just arrived, x >= 2 and y >= 2, and its top-left corner lies on
// the stride grid (stride 1 or 2). Borders are not padded here: a padded
// layer is fed with its zero border included.
//
// Interface: clear (pulse) restarts at pixel (0,0); width is the row length
// (3..W_MAX); pix_valid/pix_data/pix_ready is the pixel stream; en is the
// pipeline enable of the accelerator (pix_ready = en). win[ic][tap] with
// tap = 3*ky + kx, and win_valid.
// Timing: the window and win_valid are registered and change only on
// enabled cycles, one pixel per enabled cycle.
//
// The line-buffer principle follows the accelerator description; W_MAX,
// the pixel packing and the stride support are this design's choices.
module line_buffer
  import plut_pkg::*;
#(
  parameter int unsigned W_MAX = 58
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic [$clog2(W_MAX):0]   width,
  input  logic                     stride2,
  input  logic                     en,
  input  logic                     pix_valid,
  input  logic [BUS_W-1:0]         pix_data,
  output logic                     pix_ready,
  output code_t                    win [IN_CH][KK],
  output logic                     win_valid
);

  localparam int unsigned XW = $clog2(W_MAX) + 1;

  logic [BUS_W-1:0] row0 [W_MAX];   // row y-2
  logic [BUS_W-1:0] row1 [W_MAX];   // row y-1
  logic [BUS_W-1:0] wreg [3][3];    // [ky][kx] packed pixels
  logic [XW-1:0]    x_q;
  logic [15:0]      y_q;
  logic             take;
  logic [BUS_W-1:0] r0, r1;
  logic             on_grid;

  assign pix_ready = en;
  assign take      = en && pix_valid;

  always_comb begin
    r0 = row0[x_q[XW-2:0]];
    r1 = row1[x_q[XW-2:0]];
    on_grid = (x_q >= XW'(2)) && (y_q >= 16'd2) &&
              (!stride2 || (!x_q[0] && !y_q[0]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
      win_valid <= 1'b0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) wreg[i][j] <= '0;
      for (int i = 0; i < int'(W_MAX); i++) begin
        row0[i] <= '0;
        row1[i] <= '0;
      end
    end else if (clear) begin
      x_q <= '0;
      y_q <= '0;
      win_valid <= 1'b0;
    end else if (en) begin
      win_valid <= take && on_grid;
      if (take) begin
        row0[x_q[XW-2:0]] <= r1;
        row1[x_q[XW-2:0]] <= pix_data;
        for (int ky = 0; ky < 3; ky++) begin
          wreg[ky][0] <= wreg[ky][1];
          wreg[ky][1] <= wreg[ky][2];
        end
        wreg[0][2] <= r0;
        wreg[1][2] <= r1;
        wreg[2][2] <= pix_data;
        if (x_q == width - 1'b1) begin
          x_q <= '0;
          y_q <= y_q + 16'd1;
        end else begin
          x_q <= x_q + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int ic = 0; ic < int'(IN_CH); ic++)
      for (int ky = 0; ky < 3; ky++)
        for (int kx = 0; kx < 3; kx++)
          win[ic][ky * 3 + kx] = code_t'(wreg[ky][kx][ic * 4 +: 4]);
  end

endmodule
