// plut_table: the shared product look-up table (P-LUT).
//
// Holds the products of every pair of the eight 3-bit magnitude levels as
// 32-bit unsigned fixed-point numbers (24 fractional bits). Because
// level(i)*level(j) = level(j)*level(i), only the upper triangle of the 8x8
// product matrix is kept: 36 words instead of 64. The products are worked
// out offline from the codebook and written here by the host through the
// register interface; one copy serves all layers and all 64 convolution
// units, which read the whole table through the lut_q broadcast and index
// it themselves (see plut_pkg::lut_product).
//
// Interface: a write port (we, waddr = triangular address 0..35, wdata)
// and the whole table as lut_q. Entry (i, j) with i <= j sits at
// plut_pkg::tri_addr(i, j) = i*8 - i*(i-1)/2 + (j - i).
// Timing: a write takes effect at the next clock edge; lut_q follows the
// registers directly. The table is cleared to zero by reset.
//
// The 8x8 table, its 32-bit entries, the sharing and the half storage follow
// the accelerator description; the write port and the fractional format are
// this design's choices.
module plut_table
  import plut_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [5:0]       waddr,
  input  lut_entry_t       wdata,
  output lut_entry_t       lut_q [LUT_N]
);

  lut_entry_t mem [LUT_N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LUT_N); i++) mem[i] <= '0;
    end else if (we && (waddr < 6'(LUT_N))) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(LUT_N); i++) lut_q[i] = mem[i];
  end

endmodule
