// dct_2d: 8x8 two-dimensional DCT by row-column decomposition with a single,
// time-shared 1-D DCT.
//
// Pixels (12-bit, level-shifted) enter the ping buffer in row-major order, eight
// per row. The pong buffer takes a row, the 1-D DCT turns it into eight
// coefficients in eight cycles, and these are shifted into the transpose buffer.
// After the eighth row the pong buffer switches its input mux to the transpose
// buffer and feeds the eight columns back through the same 1-D DCT; the column
// results are the 2-D coefficients and go to the output buffer. While the
// columns are processed the ping buffer can already collect the next block's
// first row.
// Interface: writeData/writeEn/full (12-bit pixels) and readData/readEn/empty
// (12-bit coefficients), both with FIFO semantics. Coefficients come out in
// column-major order: column u (horizontal frequency) carries F(v,u) for
// v = 0..7. Throughput: one 8x8 block per 144 cycles (72 for the row pass,
// 72 for the column pass, each row or column = one load cycle + eight
// coefficient cycles). Latency: the first coefficient of a block is readable
// 76 cycles after the pong buffer starts loading its first row (8 row loads,
// 64 row coefficients, one column load, one column coefficient and the two
// register stages of the 1-D DCT and the output buffer). The block partition,
// these cycle counts and the FIFO hand-shakes between the sub-blocks follow the
// architecture.
module dct_2d
  import jpeg_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [DCT_W-1:0] writeData,
  input  logic             writeEn,
  output logic             full,
  output logic [DCT_W-1:0] readData,
  input  logic             readEn,
  output logic             empty
);
  logic [ROW_W-1:0] ping_data, col_data, pong_data;
  logic ping_empty, ping_full, ping_rd;
  logic col_empty, col_rd;
  logic pong_empty, pong_twod;
  logic [2:0] pong_k;
  logic dct_full, tr_we, ob_we, ob_full;
  logic [DCT_W-1:0] coef;

  ping_buffer u_ping (
    .clk, .rst,
    .writeData (writeData), .writeEn (writeEn), .full (ping_full),
    .readData (ping_data), .readEn (ping_rd), .empty (ping_empty)
  );
  assign full = ping_full;

  pong_buffer u_pong (
    .clk, .rst,
    .row_data (ping_data), .row_empty (ping_empty), .row_readEn (ping_rd),
    .col_data (col_data), .col_empty (col_empty), .col_readEn (col_rd),
    .readData (pong_data), .coef_idx (pong_k), .twod (pong_twod),
    .empty (pong_empty), .full (), .readEn (!dct_full), .muxsel ()
  );

  dct_1d u_dct (
    .clk, .rst,
    .writeData (pong_data), .coef_idx (pong_k), .twod_in (pong_twod),
    .writeEn (!pong_empty), .full (dct_full),
    .coef_out (coef), .tr_writeEn (tr_we), .ob_writeEn (ob_we), .ob_full (ob_full)
  );

  transpose_buffer u_tr (
    .clk, .rst,
    .writeData (coef), .writeEn (tr_we),
    .readData (col_data), .readEn (col_rd), .empty (col_empty)
  );

  out_buffer #(.W(DCT_W)) u_ob (
    .clk, .rst,
    .writeData (coef), .writeEn (ob_we), .full (ob_full),
    .readData (readData), .readEn (readEn), .empty (empty)
  );
endmodule
