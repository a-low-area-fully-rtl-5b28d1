// huffman_coder: four-stage pipelined Huffman coder of run-length coded words.
//
//   Stage 1 (receive): registers run (zrl), Z, dc, and two derived values: the
//     DC difference from dc_diff_coder and the luminance flag from block_marker
//     (the marker steps on every DC word, i.e. every new block).
//   Stage 2 (category selection): x = dc ? diff : Z; cat = number of significant
//     bits of |x|.
//   Stage 3 (Huffman coding): the DC table (indexed by cat, 11-bit code + 4-bit
//     length) and the AC table (indexed by {run, cat}, 16-bit code + 4-bit
//     length-1) of the component chosen by lumin2 are read into registers;
//     x becomes Z+ = x - 1 when x is negative (signx = 0), else x.
//   Stage 4 (send): dc3 selects the DC entry (code padded with 5 zero bits,
//     length as is) or the AC entry (length + 1); {code16, len5, cat4, Z+11}
//     = 36 bits is written to the output buffer.
// The tables are the standard's typical tables generated in jpeg_pkg. The whole
// pipeline advances together when the output buffer is not full (a global
// stall), one word per cycle. Latency: three cycles from an accepted input to the
// output buffer write, four to readData.
// Interface: writeData(16: {dc, run, value})/writeEn/full in, color mode,
// readData(36)/readEn/empty out. Stages, table widths and the length-minus-one
// storage follow the architecture; the global-stall control is this design's.
module huffman_coder
  import jpeg_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      color,
  input  rlc_word_t writeData,
  input  logic      writeEn,
  output logic      full,
  output huf_word_t readData,
  input  logic      readEn,
  output logic      empty
);
  localparam logic [255:0][19:0] AC_LUM = build_ac_table(1'b0);
  localparam logic [255:0][19:0] AC_CHR = build_ac_table(1'b1);
  localparam logic [15:0][14:0]  DC_LUM = build_dc_table(1'b0);
  localparam logic [15:0][14:0]  DC_CHR = build_dc_table(1'b1);

  logic ob_full, adv, take;
  assign adv  = !ob_full;
  assign full = ob_full;
  assign take = writeEn && adv;

  // differential coder and block marker
  comp_e next_comp, cur_comp, in_comp;
  logic signed [COEF_W-1:0] diff;

  block_marker u_marker (
    .clk, .rst, .color, .advance (take && writeData.dc),
    .comp (next_comp), .lumin ()
  );
  assign in_comp = writeData.dc ? next_comp : cur_comp;

  dc_diff_coder u_diff (
    .clk, .rst, .strobe (take && writeData.dc), .comp (next_comp),
    .value (writeData.value), .diff (diff)
  );

  // stage registers
  logic v1, v2, v3;
  logic [3:0] zrl1, zrl2;
  logic signed [COEF_W-1:0] z1, diff1, x2;
  logic [COEF_W-1:0] zp3;
  logic dc1, dc2, dc3, lumin1, lumin2;
  logic [3:0] cat2, cat3;
  logic [19:0] ac3;
  logic [14:0] dc_e3;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      cur_comp <= COMP_Y;
      zrl1 <= '0; z1 <= '0; diff1 <= '0; dc1 <= 1'b0; lumin1 <= 1'b1;
      zrl2 <= '0; cat2 <= '0; x2 <= '0; dc2 <= 1'b0; lumin2 <= 1'b1;
      ac3 <= '0; dc_e3 <= '0; cat3 <= '0; zp3 <= '0; dc3 <= 1'b0;
    end else if (adv) begin
      // stage 1: receive
      v1 <= take;
      if (take) begin
        zrl1   <= writeData.run;
        z1     <= writeData.value;
        dc1    <= writeData.dc;
        diff1  <= diff;
        lumin1 <= (in_comp == COMP_Y);
        cur_comp <= in_comp;
      end
      // stage 2: category selection
      v2     <= v1;
      zrl2   <= zrl1;
      x2     <= dc1 ? diff1 : z1;
      cat2   <= category(dc1 ? diff1 : z1);
      dc2    <= dc1;
      lumin2 <= lumin1;
      // stage 3: Huffman table look-up
      v3    <= v2;
      ac3   <= lumin2 ? AC_LUM[{zrl2, cat2}] : AC_CHR[{zrl2, cat2}];
      dc_e3 <= lumin2 ? DC_LUM[cat2] : DC_CHR[cat2];
      zp3   <= x2[COEF_W-1] ? COEF_W'(x2 - 11'sd1) : x2;   // signx = ~x[10]
      cat3  <= cat2;
      dc3   <= dc2;
    end
  end

  // stage 4: send
  huf_word_t wword;
  always_comb begin
    wword.code = dc3 ? {5'h00, dc_e3[14:4]} : ac3[19:4];
    wword.len  = dc3 ? {1'b0, dc_e3[3:0]} : 5'(ac3[3:0]) + 5'd1;
    wword.cat  = cat3;
    wword.zp   = zp3;
  end

  out_buffer #(.W(HUF_W)) u_ob (
    .clk, .rst,
    .writeData (wword), .writeEn (v3 && adv), .full (ob_full),
    .readData (readData), .readEn (readEn), .empty (empty)
  );
  // v3 is only written when adv, i.e. when the buffer has room.
endmodule
