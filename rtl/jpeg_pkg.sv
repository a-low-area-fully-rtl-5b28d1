// jpeg_pkg: types, constants and constant tables shared by the JPEG encoder blocks.
//
// Holds the word formats passed between the stages, the rounding rules of the
// 1-D DCT and of the quantizer, and functions that build every look-up table at
// elaboration time:
//   * the 8x40-bit DCT weight table (four 10-bit two's-complement weights per
//     coefficient index, weights = round(1024 * 0.5*cos(k*pi/16)));
//   * the zigzag scan order (computed by walking the anti-diagonals);
//   * the reciprocal quantization tables Q* = round(2048/Q), built from the
//     example luminance and chrominance tables of the JPEG standard (Annex K.1/K.2);
//   * the DC and AC Huffman code tables, generated from the standard's BITS/HUFFVAL
//     lists (Annex K.3 to K.6) with the canonical code assignment of Annex C.
// The table layouts (40-bit weight rows, 15-bit DC and 20-bit AC Huffman entries
// with AC lengths stored minus one) follow the architecture; the weight scale
// and the rounding of 2048/Q are this design's choices.
package jpeg_pkg;

  // ------------------------------------------------------------------ widths
  localparam int unsigned PIX_W   = 8;   // input pixel
  localparam int unsigned DCT_W   = 12;  // DCT datapath word
  localparam int unsigned ROW_W   = 8 * DCT_W;  // 96-bit row / column word
  localparam int unsigned WGT_W   = 10;  // DCT weight
  localparam int unsigned PROD_W  = DCT_W + WGT_W;  // 22-bit product
  localparam int unsigned QS_W    = 12;  // Q* = 2048/Q
  localparam int unsigned QP_W    = 24;  // quantizer product
  localparam int unsigned COEF_W  = 11;  // quantized coefficient
  localparam int unsigned RLC_W   = 1 + 4 + COEF_W;       // {dc, run, value}
  localparam int unsigned HUF_W   = 16 + 5 + 4 + COEF_W;  // {code, len, cat, Z+}
  localparam int unsigned OUT_W   = 32;  // compressed stream word

  // Image components, in the order the block marker steps through a 4:2:2 MCU.
  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  // Run-length coded word.
  typedef struct packed {
    logic                     dc;    // 1: DC coefficient
    logic [3:0]               run;   // zero run length
    logic signed [COEF_W-1:0] value; // coefficient (DC: undifferenced)
  } rlc_word_t;

  // Huffman coded word, written to the Huffman coder's output buffer.
  typedef struct packed {
    logic [15:0]       code;  // Huffman code, right aligned
    logic [4:0]        len;   // Huffman code length
    logic [3:0]        cat;   // category = number of amplitude bits
    logic [COEF_W-1:0] zp;    // Z+ : value, minus one when negative
  } huf_word_t;

  // ------------------------------------------------------------- DCT weights
  localparam logic signed [WGT_W-1:0] WA = 10'sd502;  // 0.5cos(1pi/16)*1024
  localparam logic signed [WGT_W-1:0] WB = 10'sd473;  // 0.5cos(2pi/16)*1024
  localparam logic signed [WGT_W-1:0] WC = 10'sd426;  // 0.5cos(3pi/16)*1024
  localparam logic signed [WGT_W-1:0] WD = 10'sd362;  // 0.5cos(4pi/16)*1024
  localparam logic signed [WGT_W-1:0] WE = 10'sd284;  // 0.5cos(5pi/16)*1024
  localparam logic signed [WGT_W-1:0] WF = 10'sd196;  // 0.5cos(6pi/16)*1024
  localparam logic signed [WGT_W-1:0] WG = 10'sd100;  // 0.5cos(7pi/16)*1024

  // Weight row for coefficient index k: {w3, w2, w1, w0}; w0 multiplies the
  // (x0, x7) sum/difference, w3 the (x3, x4) one.
  function automatic logic [4*WGT_W-1:0] dct_weights(input logic [2:0] k);
    case (k)
      3'd0: return {WD, WD, WD, WD};
      3'd1: return {WG, WE, WC, WA};
      3'd2: return {-WB, -WF, WF, WB};
      3'd3: return {-WE, -WA, -WG, WC};
      3'd4: return {WD, -WD, -WD, WD};
      3'd5: return {WC, WG, -WA, WE};
      3'd6: return {-WF, WB, -WB, WF};
      default: return {-WA, WC, -WE, WG};
    endcase
  endfunction

  // 22-bit product -> 12 bits: drop 10 fraction bits, add bit 9, except when the
  // kept part is already the largest positive value.
  function automatic logic signed [DCT_W-1:0] round_prod(input logic signed [PROD_W-1:0] r);
    logic signed [DCT_W-1:0] hi;
    hi = r[PROD_W-1 -: DCT_W];
    if (hi == $signed({1'b0, {(DCT_W-1){1'b1}}})) return hi;
    return hi + DCT_W'(r[WGT_W-1]);
  endfunction

  // 24-bit quantizer product -> 11 bits: divide by 2048 with the same rounding,
  // saturating to the 11-bit range.
  function automatic logic signed [COEF_W-1:0] round_quant(input logic signed [QP_W-1:0] r);
    logic signed [QP_W-COEF_W:0] t;  // 14 bits
    t = $signed({r[QP_W-1], r[QP_W-1:COEF_W]}) + $signed({{(QP_W-COEF_W){1'b0}}, r[COEF_W-1]});
    if (t > 14'sd1023) return 11'sd1023;
    if (t < -14'sd1024) return -11'sd1024;
    return t[COEF_W-1:0];
  endfunction

  // ------------------------------------------------------------------ zigzag
  // Natural (row-major) index of zigzag position k.
  function automatic logic [5:0] zigzag_natural(input int k);
    int r, c;
    r = 0; c = 0;
    for (int i = 0; i < k; i++) begin
      if (((r + c) % 2) == 0) begin
        if (c == 7) r++;
        else if (r == 0) c++;
        else begin r--; c++; end
      end else begin
        if (r == 7) c++;
        else if (c == 0) r++;
        else begin r++; c--; end
      end
    end
    return 6'(r * 8 + c);
  endfunction

  // ---------------------------------------------------- quantization tables
  // Example tables of the JPEG standard, natural (row-major) order.
  localparam logic [0:63][7:0] QTAB_LUM = {
    8'd16, 8'd11, 8'd10, 8'd16, 8'd24, 8'd40, 8'd51, 8'd61,
    8'd12, 8'd12, 8'd14, 8'd19, 8'd26, 8'd58, 8'd60, 8'd55,
    8'd14, 8'd13, 8'd16, 8'd24, 8'd40, 8'd57, 8'd69, 8'd56,
    8'd14, 8'd17, 8'd22, 8'd29, 8'd51, 8'd87, 8'd80, 8'd62,
    8'd18, 8'd22, 8'd37, 8'd56, 8'd68, 8'd109, 8'd103, 8'd77,
    8'd24, 8'd35, 8'd55, 8'd64, 8'd81, 8'd104, 8'd113, 8'd92,
    8'd49, 8'd64, 8'd78, 8'd87, 8'd103, 8'd121, 8'd120, 8'd101,
    8'd72, 8'd92, 8'd95, 8'd98, 8'd112, 8'd100, 8'd103, 8'd99};
  localparam logic [0:63][7:0] QTAB_CHR = {
    8'd17, 8'd18, 8'd24, 8'd47, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd18, 8'd21, 8'd26, 8'd66, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd24, 8'd26, 8'd56, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd47, 8'd66, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99,
    8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99, 8'd99};

  // Reciprocal table in zigzag order: entry k = round(2048 / Q[zigzag_natural(k)]).
  function automatic logic [63:0][QS_W-1:0] build_qstar(input logic chrom);
    logic [63:0][QS_W-1:0] t;
    int q;
    for (int k = 0; k < 64; k++) begin
      q = chrom ? int'(QTAB_CHR[zigzag_natural(k)]) : int'(QTAB_LUM[zigzag_natural(k)]);
      t[k] = QS_W'((4096 / q + 1) / 2);
    end
    return t;
  endfunction

  // RAM address (column-major, as the 2-D DCT delivers coefficients) of zigzag
  // position k: coefficient (row v, column u) sits at address u*8 + v.
  function automatic logic [63:0][5:0] build_zigzag_addr();
    logic [63:0][5:0] t;
    logic [5:0] n;
    for (int k = 0; k < 64; k++) begin
      n = zigzag_natural(k);
      t[k] = {n[2:0], n[5:3]};
    end
    return t;
  endfunction

  // ------------------------------------------------------- Huffman tables
  // BITS (number of codes of length 1..16) and HUFFVAL of Annex K.3 - K.6.
  localparam logic [1:16][7:0] DC_LUM_BITS = {8'd0, 8'd1, 8'd5, 8'd1, 8'd1, 8'd1, 8'd1, 8'd1,
                                              8'd1, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
  localparam logic [1:16][7:0] DC_CHR_BITS = {8'd0, 8'd3, 8'd1, 8'd1, 8'd1, 8'd1, 8'd1, 8'd1,
                                              8'd1, 8'd1, 8'd1, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
  localparam logic [1:16][7:0] AC_LUM_BITS = {8'd0, 8'd2, 8'd1, 8'd3, 8'd3, 8'd2, 8'd4, 8'd3,
                                              8'd5, 8'd5, 8'd4, 8'd4, 8'd0, 8'd0, 8'd1, 8'h7d};
  localparam logic [1:16][7:0] AC_CHR_BITS = {8'd0, 8'd2, 8'd1, 8'd2, 8'd4, 8'd4, 8'd3, 8'd4,
                                              8'd7, 8'd5, 8'd4, 8'd4, 8'd0, 8'd1, 8'd2, 8'h77};
  localparam logic [0:161][7:0] AC_LUM_VAL = {
    8'h01, 8'h02, 8'h03, 8'h00, 8'h04, 8'h11, 8'h05, 8'h12, 8'h21, 8'h31, 8'h41, 8'h06,
    8'h13, 8'h51, 8'h61, 8'h07, 8'h22, 8'h71, 8'h14, 8'h32, 8'h81, 8'h91, 8'ha1, 8'h08,
    8'h23, 8'h42, 8'hb1, 8'hc1, 8'h15, 8'h52, 8'hd1, 8'hf0, 8'h24, 8'h33, 8'h62, 8'h72,
    8'h82, 8'h09, 8'h0a, 8'h16, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h25, 8'h26, 8'h27, 8'h28,
    8'h29, 8'h2a, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44, 8'h45,
    8'h46, 8'h47, 8'h48, 8'h49, 8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58, 8'h59,
    8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69, 8'h6a, 8'h73, 8'h74, 8'h75,
    8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87, 8'h88, 8'h89,
    8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a, 8'ha2, 8'ha3,
    8'ha4, 8'ha5, 8'ha6, 8'ha7, 8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4, 8'hb5, 8'hb6,
    8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5, 8'hc6, 8'hc7, 8'hc8, 8'hc9,
    8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda, 8'he1, 8'he2,
    8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea, 8'hf1, 8'hf2, 8'hf3, 8'hf4,
    8'hf5, 8'hf6, 8'hf7, 8'hf8, 8'hf9, 8'hfa};
  localparam logic [0:161][7:0] AC_CHR_VAL = {
    8'h00, 8'h01, 8'h02, 8'h03, 8'h11, 8'h04, 8'h05, 8'h21, 8'h31, 8'h06, 8'h12, 8'h41,
    8'h51, 8'h07, 8'h61, 8'h71, 8'h13, 8'h22, 8'h32, 8'h81, 8'h08, 8'h14, 8'h42, 8'h91,
    8'ha1, 8'hb1, 8'hc1, 8'h09, 8'h23, 8'h33, 8'h52, 8'hf0, 8'h15, 8'h62, 8'h72, 8'hd1,
    8'h0a, 8'h16, 8'h24, 8'h34, 8'he1, 8'h25, 8'hf1, 8'h17, 8'h18, 8'h19, 8'h1a, 8'h26,
    8'h27, 8'h28, 8'h29, 8'h2a, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39, 8'h3a, 8'h43, 8'h44,
    8'h45, 8'h46, 8'h47, 8'h48, 8'h49, 8'h4a, 8'h53, 8'h54, 8'h55, 8'h56, 8'h57, 8'h58,
    8'h59, 8'h5a, 8'h63, 8'h64, 8'h65, 8'h66, 8'h67, 8'h68, 8'h69, 8'h6a, 8'h73, 8'h74,
    8'h75, 8'h76, 8'h77, 8'h78, 8'h79, 8'h7a, 8'h82, 8'h83, 8'h84, 8'h85, 8'h86, 8'h87,
    8'h88, 8'h89, 8'h8a, 8'h92, 8'h93, 8'h94, 8'h95, 8'h96, 8'h97, 8'h98, 8'h99, 8'h9a,
    8'ha2, 8'ha3, 8'ha4, 8'ha5, 8'ha6, 8'ha7, 8'ha8, 8'ha9, 8'haa, 8'hb2, 8'hb3, 8'hb4,
    8'hb5, 8'hb6, 8'hb7, 8'hb8, 8'hb9, 8'hba, 8'hc2, 8'hc3, 8'hc4, 8'hc5, 8'hc6, 8'hc7,
    8'hc8, 8'hc9, 8'hca, 8'hd2, 8'hd3, 8'hd4, 8'hd5, 8'hd6, 8'hd7, 8'hd8, 8'hd9, 8'hda,
    8'he2, 8'he3, 8'he4, 8'he5, 8'he6, 8'he7, 8'he8, 8'he9, 8'hea, 8'hf2, 8'hf3, 8'hf4,
    8'hf5, 8'hf6, 8'hf7, 8'hf8, 8'hf9, 8'hfa};

  // AC table, indexed by {run, cat}: {code[15:0], length-1 [3:0]}; unused
  // symbols hold zero. Canonical codes: consecutive within a length, shifted
  // left by one when the length grows.
  function automatic logic [255:0][19:0] build_ac_table(input logic chrom);
    logic [255:0][19:0] t;
    int code, idx, n;
    logic [7:0] sym;
    t = '0;
    code = 0; idx = 0;
    for (int len = 1; len <= 16; len++) begin
      n = chrom ? int'(AC_CHR_BITS[len]) : int'(AC_LUM_BITS[len]);
      for (int i = 0; i < n; i++) begin
        sym = chrom ? AC_CHR_VAL[idx] : AC_LUM_VAL[idx];
        t[sym] = {16'(code), 4'(len - 1)};
        code++; idx++;
      end
      code = code * 2;
    end
    return t;
  endfunction

  // DC table, indexed by category 0..11: {code[10:0], length[3:0]}.
  function automatic logic [15:0][14:0] build_dc_table(input logic chrom);
    logic [15:0][14:0] t;
    int code, idx, n;
    t = '0;
    code = 0; idx = 0;
    for (int len = 1; len <= 16; len++) begin
      n = chrom ? int'(DC_CHR_BITS[len]) : int'(DC_LUM_BITS[len]);
      for (int i = 0; i < n; i++) begin
        t[idx] = {11'(code), 4'(len)};  // DC HUFFVAL is 0..11 in order
        code++; idx++;
      end
      code = code * 2;
    end
    return t;
  endfunction

  // Category: number of significant bits of |x| (0 for x = 0).
  function automatic logic [3:0] category(input logic signed [COEF_W-1:0] x);
    logic [COEF_W:0] m;
    logic [3:0] c;
    m = x[COEF_W-1] ? (COEF_W+1)'(-$signed({x[COEF_W-1], x})) : (COEF_W+1)'(x);
    c = 4'd0;
    for (int i = 0; i <= COEF_W; i++) if (m[i]) c = 4'(i + 1);
    return c;
  endfunction

endpackage
