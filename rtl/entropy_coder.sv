// entropy_coder: run-length coder, Huffman coder and assembler in series.
//
// Takes the 64 zigzag-ordered quantized coefficients of each block (11-bit, DC
// first) and produces the compressed JPEG entropy-coded data as 32-bit words,
// first bit in the MSB. Each sub-block ends in its own two-register output
// buffer, so the chain runs at one word per cycle and stalls cleanly from the
// output back to the input. color selects 4:2:2 Y,Y,Cb,Cr block order for the
// table and DC-predictor selection (0: every block is luminance).
// Interface: writeData(11)/writeEn/full in, readData(32)/readEn/empty out.
module entropy_coder
  import jpeg_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              color,
  input  logic [COEF_W-1:0] writeData,
  input  logic              writeEn,
  output logic              full,
  output logic [OUT_W-1:0]  readData,
  input  logic              readEn,
  output logic              empty
);
  rlc_word_t rlc_data;
  huf_word_t huf_data;
  logic rlc_empty, huf_full, huf_empty, asm_full;

  rlc u_rlc (
    .clk, .rst,
    .writeData (writeData), .writeEn (writeEn), .full (full),
    .readData (rlc_data), .readEn (!huf_full), .empty (rlc_empty)
  );

  huffman_coder u_huf (
    .clk, .rst, .color,
    .writeData (rlc_data), .writeEn (!rlc_empty), .full (huf_full),
    .readData (huf_data), .readEn (!asm_full), .empty (huf_empty)
  );

  assembler u_asm (
    .clk, .rst,
    .writeData (huf_data), .writeEn (!huf_empty), .full (asm_full),
    .readData (readData), .readEn (readEn), .empty (empty)
  );
endmodule
