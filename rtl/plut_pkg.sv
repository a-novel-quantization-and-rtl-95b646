// plut_pkg: types, sizes and helper functions shared by the P-LUT convolution
// accelerator.
//
// The whole datapath works on 4-bit sign/magnitude codes: bit 3 is the sign,
// bits 2:0 index one of eight shared quantization levels (index 0 is the zero
// level). A product of two codes is never computed at run time: the magnitude
// of the product is read from the product look-up table (P-LUT), an 8x8
// table of 32-bit fixed-point values of which only the upper triangle is
// stored because the table is symmetric, and the sign is the XOR of the two
// sign bits. The 4-bit code, the 8x8 table, the 32-bit entries, the
// symmetric half storage, the 8 input and 8 output channels and the 32-bit
// bus follow the accelerator description; the fixed-point format (24
// fractional bits), the accumulator width, the register map and the stream
// format are this design's choices.
package plut_pkg;

  // ---- code format -------------------------------------------------------
  localparam int unsigned IDX_W   = 3;              // magnitude index bits
  localparam int unsigned CODE_W  = IDX_W + 1;      // sign + index
  localparam int unsigned NLEV    = 1 << IDX_W;     // 8 quantization levels
  localparam int unsigned LUT_W   = 32;             // P-LUT entry width
  localparam int unsigned LUT_N   = NLEV * (NLEV + 1) / 2;  // 36 stored entries
  localparam int unsigned FRAC    = 24;             // fractional bits of entries
  localparam int unsigned ACC_W   = 32;             // signed partial-sum width

  // ---- array geometry ----------------------------------------------------
  localparam int unsigned IN_CH   = 8;              // input channels per pass
  localparam int unsigned OUT_CH  = 8;              // output channels per pass
  localparam int unsigned KK      = 9;              // 3x3 taps
  localparam int unsigned BUS_W   = 32;             // external stream width
  localparam int unsigned TILE_W  = OUT_CH * IN_CH * KK;   // 576 weights / tile

  // ---- canonical Huffman tables of the S-Huff stream ----------------------
  localparam int unsigned HLMAX   = 7;              // longest magnitude code

  typedef struct packed {
    logic             sign;
    logic [IDX_W-1:0] idx;
  } code_t;

  typedef logic [LUT_W-1:0] lut_entry_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Address of entry (a,b) in the upper-triangular storage. Row r holds
  // columns r..NLEV-1; the row starts at r*NLEV - r*(r-1)/2.
  function automatic logic [5:0] tri_addr(input logic [IDX_W-1:0] a,
                                          input logic [IDX_W-1:0] b);
    logic [IDX_W-1:0] lo, hi;
    int r;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    r  = int'(lo);
    return 6'(r * int'(NLEV) - (r * (r - 1)) / 2 + (int'(hi) - r));
  endfunction

  // Signed product of two codes read from the shared table: the magnitude
  // comes from the P-LUT, the sign is the XOR of the operand signs.
  function automatic acc_t lut_product(input lut_entry_t lut [LUT_N],
                                       input code_t w, input code_t a);
    acc_t mag;
    mag = acc_t'(lut[tri_addr(w.idx, a.idx)]);
    return (w.sign ^ a.sign) ? -mag : mag;
  endfunction

  // ---- AXI4-Lite register map (byte addresses) ----------------------------
  localparam logic [11:0] REG_CTRL    = 12'h000;  // [0] start, [1] raw output, [2] load tile, [3] use next tile
  localparam logic [11:0] REG_STATUS  = 12'h004;  // [0] busy, [1] done (sticky), [2] loading, [3] tile pending
  localparam logic [11:0] REG_WIDTH   = 12'h008;  // input width in pixels
  localparam logic [11:0] REG_HEIGHT  = 12'h00C;  // input height in rows
  localparam logic [11:0] REG_STRIDE  = 12'h010;  // 1 or 2
  localparam logic [11:0] REG_SHIFT   = 12'h014;  // signed PoT scale shift of the outputs
  localparam logic [11:0] REG_WWORDS  = 12'h018;  // words of the next S-Huff tile on the weight stream
  localparam logic [11:0] REG_HCOUNT  = 12'h01C;  // code counts per length 1..7, 3 bits each
  localparam logic [11:0] REG_HSYM    = 12'h020;  // symbols in canonical order, 3 bits each
  localparam logic [11:0] REG_OUTCNT  = 12'h024;  // read only: output pixels of the last pass
  localparam logic [11:0] REG_LEVEL0  = 12'h040;  // 8 activation levels, 0x040..0x05C
  localparam logic [11:0] REG_LUT0    = 12'h100;  // 36 P-LUT entries, 0x100..0x18C

endpackage
