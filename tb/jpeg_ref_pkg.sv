// jpeg_ref_pkg: reference models for the encoder testbenches.
//
// Integer models of every stage, written from the JPEG definitions rather than
// from the RTL structure: the DCT weights are computed here from the DCT-II
// basis with $cos, the zigzag order is the standard's listed table, run-length
// coding follows the standard's algorithm, and the Huffman codes are assigned
// from the BITS/HUFFVAL lists with the procedure of the standard's Annex C. The
// fixed-point rules (rounding of each product to 12 bits, Q* = round(2048/Q),
// rounding of the quantizer product) are the architecture's and are mirrored
// here so that results can be compared bit for bit.
package jpeg_ref_pkg;
  import jpeg_pkg::*;

  typedef int blk_t[64];

  localparam int ZZ[64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  function automatic int rnd_real(real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // weight of the pair (x_j, x_(7-j)) for coefficient k, times 1024
  function automatic int ref_weight(int k, int j);
    real c;
    c = (k == 0) ? (1.0 / $sqrt(2.0)) : 1.0;
    return rnd_real(512.0 * c * $cos((2.0 * j + 1.0) * k * 3.14159265358979 / 16.0));
  endfunction

  function automatic int sext(int v, int bits);
    int m;
    m = v & ((1 << bits) - 1);
    if (m >= (1 << (bits - 1))) m -= (1 << bits);
    return m;
  endfunction

  // product rounding: floor(p/1024) + bit 9, unless already the 12-bit maximum
  function automatic int ref_round_prod(int p);
    int hi;
    hi = p >>> 10;
    if (hi == 2047) return hi;
    return sext(hi + ((p >>> 9) & 1), 12);
  endfunction

  function automatic int ref_dct1(int x[8], int k);
    int s, xs;
    s = 0;
    for (int j = 0; j < 4; j++) begin
      xs = (k % 2 == 1) ? x[j] - x[7-j] : x[j] + x[7-j];
      s += ref_round_prod(sext(xs, 12) * ref_weight(k, j));
    end
    return sext(s, 12);
  endfunction

  // pix: level-shifted samples, row-major. Result in column-major order:
  // index u*8+v holds F(v,u).
  function automatic blk_t ref_dct2(blk_t pix);
    blk_t res;
    int tmp[8][8];
    int x[8];
    for (int r = 0; r < 8; r++) begin
      for (int i = 0; i < 8; i++) x[i] = pix[r*8+i];
      for (int u = 0; u < 8; u++) tmp[r][u] = ref_dct1(x, u);
    end
    for (int u = 0; u < 8; u++) begin
      for (int i = 0; i < 8; i++) x[i] = tmp[i][u];
      for (int v = 0; v < 8; v++) res[u*8+v] = ref_dct1(x, v);
    end
    return res;
  endfunction

  function automatic int ref_qstar(bit chrom, int natural);
    int q;
    q = chrom ? int'(QTAB_CHR[natural]) : int'(QTAB_LUM[natural]);
    return int'($floor(2048.0 / q + 0.5));
  endfunction

  // quantize one column-major coefficient block, result in zigzag order
  function automatic blk_t ref_quant(blk_t coef, bit chrom);
    blk_t res;
    int n, z, p, t;
    for (int k = 0; k < 64; k++) begin
      n = ZZ[k];
      z = coef[(n % 8) * 8 + n / 8];
      p = z * ref_qstar(chrom, n);
      t = (p >>> 11) + ((p >>> 10) & 1);
      if (t > 1023) t = 1023;
      if (t < -1024) t = -1024;
      res[k] = t;
    end
    return res;
  endfunction

  // run-length words {dc, run, value} of one zigzag block
  function automatic void ref_rlc(input blk_t q, ref int words[$]);
    int run;
    words.push_back((1 << 15) | (q[0] & 16'h7ff));
    run = 0;
    for (int i = 1; i < 64; i++) begin
      if (q[i] == 0) run++;
      else begin
        while (run > 15) begin
          words.push_back(15 << 11);
          run -= 16;
        end
        words.push_back((run << 11) | (q[i] & 16'h7ff));
        run = 0;
      end
    end
    if (run > 0) words.push_back(0);
  endfunction

  // Huffman code of a symbol (Annex C canonical assignment)
  function automatic void ref_huff(bit chrom, bit is_dc, int sym, output int code, output int len);
    int c, idx, n, v;
    c = 0; idx = 0; code = -1; len = 0;
    for (int l = 1; l <= 16; l++) begin
      if (is_dc) n = chrom ? int'(DC_CHR_BITS[l]) : int'(DC_LUM_BITS[l]);
      else       n = chrom ? int'(AC_CHR_BITS[l]) : int'(AC_LUM_BITS[l]);
      for (int i = 0; i < n; i++) begin
        if (is_dc) v = idx;
        else       v = chrom ? int'(AC_CHR_VAL[idx]) : int'(AC_LUM_VAL[idx]);
        if (v == sym) begin code = c; len = l; end
        c++; idx++;
      end
      c = c * 2;
    end
  endfunction

  function automatic int ref_cat(int x);
    int m, c;
    m = (x < 0) ? -x : x;
    c = 0;
    while (m != 0) begin c++; m = m >> 1; end
    return c;
  endfunction

  function automatic void push_bits(ref bit bits[$], input int val, input int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(bit'((val >> i) & 1));
  endfunction

  // entropy-code one rlc word into the bit stream; prev_dc is the predictor
  function automatic void ref_code_word(input int w, input bit chrom, ref int prev_dc, ref bit bits[$]);
    int dc, run, val, x, cat, code, len;
    dc  = (w >> 15) & 1;
    run = (w >> 11) & 15;
    val = sext(w, 11);
    if (dc) begin
      x = sext(val - prev_dc, 11);
      prev_dc = val;
    end else x = val;
    cat = ref_cat(x);
    ref_huff(chrom, dc != 0, dc ? cat : (run * 16 + cat), code, len);
    push_bits(bits, code, len);
    push_bits(bits, (x < 0) ? x - 1 : x, cat);
  endfunction

  // 4:2:2 component of block number b (0 = Y, 1 = Cb, 2 = Cr)
  function automatic int ref_comp(bit color, int b);
    if (!color) return 0;
    case (b % 4)
      2: return 1;
      3: return 2;
      default: return 0;
    endcase
  endfunction

  // whole 32-bit words available in the bit queue
  function automatic void pop_words(ref bit bits[$], ref int unsigned words[$]);
    int unsigned w;
    while (bits.size() >= 32) begin
      w = 0;
      for (int i = 0; i < 32; i++) w = (w << 1) | bits.pop_front();
      words.push_back(w);
    end
  endfunction
endpackage
