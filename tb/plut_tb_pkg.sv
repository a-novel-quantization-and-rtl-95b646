// plut_tb_pkg: reference models shared by the testbenches.
//
// Holds an example codebook of eight power-of-two-sum levels, the product
// table built from it, a canonical Huffman encoder that packs weights into
// the S-Huff bit stream independently of the decoder, and a helper that
// works out the canonical codes from per-length counts.
package plut_tb_pkg;

  // Example activation/weight levels in the 24-fractional-bit format:
  // 0, 2^-4, 2^-3, 2^-3+2^-4, 2^-2, 2^-2+2^-3, 2^-1, 2^-1+2^-2
  function automatic longint level(input int i);
    longint one = 64'd1 << 24;
    case (i)
      0: return 0;
      1: return one >> 4;
      2: return one >> 3;
      3: return (one >> 3) + (one >> 4);
      4: return one >> 2;
      5: return (one >> 2) + (one >> 3);
      6: return one >> 1;
      default: return (one >> 1) + (one >> 2);
    endcase
  endfunction

  // product of two levels, same format
  function automatic longint lprod(input int i, input int j);
    return (level(i) * level(j)) >>> 24;
  endfunction

  // signed product of two 4-bit sign/magnitude codes
  function automatic longint cprod(input logic [3:0] w, input logic [3:0] a);
    longint m = lprod(int'(w[2:0]), int'(a[2:0]));
    return (w[3] ^ a[3]) ? -m : m;
  endfunction

  // Huffman table: number of codes of each length 1..7 and the symbols
  // (magnitude indices 1..7) in canonical order.
  typedef struct {
    int cnt [1:7];
    int sym [7];
  } htab_t;

  // canonical code and length of every symbol
  task automatic canon(input htab_t h, output int code [8], output int len [8]);
    int c = 0, k = 0;
    for (int s = 0; s < 8; s++) begin code[s] = 0; len[s] = 0; end
    for (int l = 1; l <= 7; l++) begin
      for (int n = 0; n < h.cnt[l]; n++) begin
        code[h.sym[k]] = c;
        len[h.sym[k]]  = l;
        c++;
        k++;
      end
      c = c << 1;
    end
  endtask

  // Pack weight codes into 32-bit words, MSB first: 0 for a zero weight,
  // else 1, sign, Huffman code of the magnitude. Pads the last word.
  task automatic encode(input htab_t h, input logic [3:0] w [], output logic [31:0] words []);
    int code [8], len [8];
    logic [31:0] q [$];
    logic [31:0] cur = 0;
    int nb = 0;
    canon(h, code, len);
    foreach (w[i]) begin
      int bits [$];
      bits.delete();
      if (w[i][2:0] == 0) bits.push_back(0);
      else begin
        bits.push_back(1);
        bits.push_back(int'(w[i][3]));
        for (int b = len[w[i][2:0]] - 1; b >= 0; b--) bits.push_back((code[w[i][2:0]] >> b) & 1);
      end
      foreach (bits[k]) begin
        cur[31 - nb] = bits[k][0];
        nb++;
        if (nb == 32) begin q.push_back(cur); cur = 0; nb = 0; end
      end
    end
    if (nb != 0) q.push_back(cur);
    words = new[q.size()];
    foreach (q[i]) words[i] = q[i];
  endtask

  // random table with lengths 1,2,3,4,5,6,6 and a random symbol order
  function automatic htab_t rand_htab();
    htab_t h;
    int perm [7];
    for (int i = 0; i < 7; i++) perm[i] = i + 1;
    for (int i = 6; i > 0; i--) begin
      int j = int'($urandom_range(i, 0));
      int t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    h.cnt = '{1, 1, 1, 1, 1, 2, 0};
    for (int i = 0; i < 7; i++) h.sym[i] = perm[i];
    return h;
  endfunction

  // packed forms of the table as the hardware registers hold them
  function automatic logic [20:0] hcount_word(input htab_t h);
    logic [20:0] r = 0;
    for (int l = 1; l <= 7; l++) r[(l-1)*3 +: 3] = 3'(h.cnt[l]);
    return r;
  endfunction
  function automatic logic [20:0] hsym_word(input htab_t h);
    logic [20:0] r = 0;
    for (int s = 0; s < 7; s++) r[s*3 +: 3] = 3'(h.sym[s]);
    return r;
  endfunction

  // random weight code, zero with probability pz percent
  function automatic logic [3:0] rand_code(input int pz);
    if (int'($urandom_range(99, 0)) < pz) return 4'(($urandom & 1) << 3);
    return {1'($urandom), 3'($urandom_range(7, 1))};
  endfunction

endpackage
