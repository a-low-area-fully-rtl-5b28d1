// assembler: packs the variable-length {Huffman code, amplitude bits} pairs into
// a stream of 32-bit words.
//
//   Stage 1: the OR-mask keeps the low cat bits of Z+; the Huffman code is shifted
//     left by cat and ORed with them (27 bits) into register A; length-A = len +
//     cat (at most 16 + 11 = 27).
//   Stage 2: register B (63 bits) is shifted left by length-A and ORed with A;
//     length-B (6 bits) becomes length-B + length-A, length-B - 32 or
//     length-B + length-A - 32 depending on whether A is merged and whether a
//     word leaves in the same cycle.
//   Stage 3: whenever length-B >= 32, the 32 oldest bits, B >> (length-B - 32),
//     are written to the output buffer if it has room.
// A is merged when it holds a word and B is below 32 bits or is emitting a word
// in the same cycle, so B never exceeds 58 valid bits (this condition is this
// design's choice: merging while a word is held back could overflow B). Bits are emitted MSB
// first, as JPEG requires. Interface: writeData(36: {code, len, cat, Z+})/
// writeEn/full in, readData(32)/readEn/empty out. Bits that do not fill a last
// word stay in B (no end-of-image padding), and no 0x00 byte is stuffed after
// 0xFF bytes: neither step is part of this architecture. The three stages and
// the register widths follow the architecture.
module assembler
  import jpeg_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  huf_word_t         writeData,
  input  logic              writeEn,
  output logic              full,
  output logic [OUT_W-1:0]  readData,
  input  logic              readEn,
  output logic              empty
);
  logic [26:0] rega;
  logic [4:0]  len_a;
  logic        va;
  logic [62:0] regb;
  logic [5:0]  len_b;
  logic ob_full, out_fire, merge, take;
  logic [26:0] a_next;
  logic [10:0] mask;

  // stage 1: OR-mask and shifter
  always_comb begin
    mask   = 11'((12'd1 << writeData.cat) - 12'd1);
    a_next = (27'(writeData.code) << writeData.cat) | 27'(writeData.zp & mask);
  end

  assign out_fire = (len_b >= 6'd32) && !ob_full;
  assign merge    = va && ((len_b < 6'd32) || out_fire);
  assign full     = va && !merge;
  assign take     = writeEn && !full;

  always_ff @(posedge clk) begin
    if (rst) begin
      va    <= 1'b0;
      rega  <= '0;
      len_a <= '0;
      regb  <= '0;
      len_b <= '0;
    end else begin
      if (take) begin
        rega  <= a_next;
        len_a <= writeData.len + 5'(writeData.cat);
        va    <= 1'b1;
      end else if (merge) begin
        va <= 1'b0;
      end
      if (merge) regb <= (regb << len_a) | 63'(rega);
      len_b <= len_b + (merge ? 6'(len_a) : 6'd0) - (out_fire ? 6'd32 : 6'd0);
    end
  end

  out_buffer #(.W(OUT_W)) u_ob (
    .clk, .rst,
    .writeData (OUT_W'(regb >> (len_b - 6'd32))), .writeEn (len_b >= 6'd32),
    .full (ob_full),
    .readData (readData), .readEn (readEn), .empty (empty)
  );
endmodule
