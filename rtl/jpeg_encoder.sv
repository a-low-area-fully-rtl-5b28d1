// jpeg_encoder: baseline JPEG encoder core - 2-D DCT, quantization in zigzag
// order and entropy coding, fully pipelined.
//
// 8-bit pixels enter block by block (each 8x8 block in row-major order) and are
// level-shifted by -128 to 12-bit signed samples. The 2-D DCT produces the 64
// coefficients of a block in column-major order; the quantizer stores them,
// reads them back in zigzag order and divides them by the quantization table
// (luminance or chrominance); the entropy coder run-length codes, Huffman codes
// and packs them into 32-bit words. Every block boundary uses the same FIFO
// hand-shake (writeEn/full, readEn/empty), so a stall at the output propagates
// back to the pixel input without losing data.
// Throughput: one block per 144 clock cycles (64 pixels / 144 cycles), set by
// the time-shared 1-D DCT. color=1 selects 4:2:2 colour: blocks come in MCUs
// Y, Y, Cb, Cr; color=0 codes every block as luminance. color should only change
// while the core is empty.
// Interface: writeData(8)/writeEn/full (pixels), readData(32)/readEn/empty
// (compressed stream). The level shift and the two block markers (one at the
// quantizer, one in the Huffman coder) are this design's way of providing the
// component information the architecture's chrom and lumin signals need.
module jpeg_encoder
  import jpeg_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             color,
  input  logic [PIX_W-1:0] writeData,
  input  logic             writeEn,
  output logic             full,
  output logic [OUT_W-1:0] readData,
  input  logic             readEn,
  output logic             empty
);
  logic [DCT_W-1:0] sample, dct_data;
  logic dct_empty, q_full, q_empty, ec_full, blk_done;
  logic [COEF_W-1:0] q_data;
  logic q_lumin;

  assign sample = DCT_W'($signed({1'b0, writeData}) - 10'sd128);

  dct_2d u_dct (
    .clk, .rst,
    .writeData (sample), .writeEn (writeEn), .full (full),
    .readData (dct_data), .readEn (!q_full), .empty (dct_empty)
  );

  block_marker u_qmarker (
    .clk, .rst, .color, .advance (blk_done), .comp (), .lumin (q_lumin)
  );

  zigzag_quantizer u_quant (
    .clk, .rst,
    .writeData (dct_data), .writeEn (!dct_empty), .full (q_full),
    .chrom (!q_lumin),
    .readData (q_data), .readEn (!ec_full), .empty (q_empty),
    .blk_done (blk_done)
  );

  entropy_coder u_ec (
    .clk, .rst, .color,
    .writeData (q_data), .writeEn (!q_empty), .full (ec_full),
    .readData (readData), .readEn (readEn), .empty (empty)
  );
endmodule
