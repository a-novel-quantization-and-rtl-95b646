// shuff_decoder: signed-Huffman (S-Huff) weight decoder.
//
// Weights are stored compressed: the sign is kept apart from the value, a
// zero weight costs a single bit, and only the magnitudes of non-zero
// weights are Huffman coded. The bit stream, most significant bit of each
// 32-bit word first, is a sequence of
//     0                      a zero weight (code 4'b0000)
//     1 s <huffman code>     a non-zero weight, s = sign, code of index 1..7
// The Huffman code is canonical: the host programs how many codes there are
// of each length 1..7 (hcount) and the symbols in canonical order (hsym);
// the first code of each length is derived here by the usual canonical rule
// first[l] = (first[l-1] + count[l-1]) << 1.
//
// Interface: start (pulse) begins one tile of N_WEIGHTS weights carried by
// exactly nwords stream words (each tile starts word aligned; padding bits
// after the last weight are discarded). s_data/s_valid/s_ready is the
// compressed stream. w_valid/w_addr/w_code give the decoded weights in
// stream order, done pulses once the tile is complete, busy is high in
// between.
// Timing: a 64-bit bit buffer is refilled with one word whenever it holds
// 32 bits or fewer, and one weight is decoded per cycle whenever the buffer
// holds all of its bits, so a tile takes about max(N_WEIGHTS, nwords)
// cycles plus a few; w_valid is registered.
//
// Separating the sign, keeping only one bit for zero weights and Huffman
// coding the non-zero values follow the compression description; the exact
// bit layout, the canonical table format and the one-weight-per-cycle rate
// are this design's choices.
module shuff_decoder
  import plut_pkg::*;
#(
  parameter int unsigned N_WEIGHTS = TILE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [15:0]      nwords,
  input  logic [2:0]       hcount [1:HLMAX],
  input  logic [IDX_W-1:0] hsym   [HLMAX],
  input  logic [31:0]      s_data,
  input  logic             s_valid,
  output logic             s_ready,
  output logic             w_valid,
  output logic [9:0]       w_addr,
  output code_t            w_code,
  output logic             done,
  output logic             busy
);

  logic [63:0] buf_q;
  logic [6:0]  nbits_q;
  logic [15:0] words_left_q;
  logic [9:0]  wcount_q;

  // canonical decode of the bits after the zero flag and the sign
  logic [7:0]       first   [1:HLMAX];
  logic [3:0]       base    [1:HLMAX];
  logic             match;
  logic [3:0]       mlen;
  logic [IDX_W-1:0] msym;
  logic [6:0]       need;
  logic             is_zero;
  logic             all_decoded;
  logic             fire, accept;

  always_comb begin
    logic [7:0] code_l;
    logic [7:0] off;
    first[1] = 8'd0;
    base[1]  = 4'd0;
    for (int l = 2; l <= int'(HLMAX); l++) begin
      first[l] = 8'((first[l-1] + 8'(hcount[l-1])) << 1);
      base[l]  = base[l-1] + 4'(hcount[l-1]);
    end
    match = 1'b0;
    mlen  = 4'd0;
    msym  = '0;
    for (int l = 1; l <= int'(HLMAX); l++) begin
      code_l = 8'(buf_q[61 -: 7] >> (7 - l));
      off    = code_l - first[l];
      if (!match && (code_l >= first[l]) && (off < 8'(hcount[l]))) begin
        match = 1'b1;
        mlen  = 4'(l);
        msym  = hsym[3'(base[l] + 4'(off))];
      end
    end
    is_zero     = ~buf_q[63];
    need        = is_zero ? 7'd1 : 7'(mlen) + 7'd2;
    all_decoded = (wcount_q == 10'(N_WEIGHTS));
    fire        = busy && !all_decoded && (nbits_q != 0) &&
                  (is_zero || match) && (need <= nbits_q);
    accept      = busy && (words_left_q != 0) && ((nbits_q <= 7'd32) || all_decoded);
  end

  assign s_ready = accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q        <= '0;
      nbits_q      <= '0;
      words_left_q <= '0;
      wcount_q     <= '0;
      busy         <= 1'b0;
      done         <= 1'b0;
      w_valid      <= 1'b0;
      w_addr       <= '0;
      w_code       <= '0;
    end else begin
      done    <= 1'b0;
      w_valid <= 1'b0;
      if (start && !busy) begin
        buf_q        <= '0;
        nbits_q      <= '0;
        words_left_q <= nwords;
        wcount_q     <= '0;
        busy         <= 1'b1;
      end else if (busy) begin
        logic [6:0]  used;
        logic [63:0] nb;
        logic [6:0]  rem;
        used = fire ? need : 7'd0;
        nb   = buf_q << used;
        rem  = nbits_q - used;
        if (accept && s_valid) begin
          if (!all_decoded) nb = nb | ({s_data, 32'd0} >> rem);
          rem          = all_decoded ? 7'd0 : rem + 7'd32;
          words_left_q <= words_left_q - 16'd1;
        end
        buf_q   <= nb;
        nbits_q <= rem;
        if (fire) begin
          w_valid     <= 1'b1;
          w_addr      <= wcount_q;
          w_code.sign <= is_zero ? 1'b0 : buf_q[62];
          w_code.idx  <= is_zero ? '0 : msym;
          wcount_q    <= wcount_q + 10'd1;
        end
        if (all_decoded && (words_left_q == 0 || (words_left_q == 16'd1 && s_valid))) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // the host must keep every tile's weights inside its word count
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    busy && words_left_q == 0 && !all_decoded |-> (fire || nbits_q != 0))
    else $error("S-Huff stream ended before all weights were decoded");

endmodule
