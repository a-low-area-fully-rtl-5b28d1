// transpose_buffer: 63 x 12-bit shift register that turns the 64 row-ordered
// 1-D DCT coefficients of a block into eight columns.
//
// Coefficients enter at reg62 and the register shifts right (reg[i] <= reg[i+1]).
// After 63 shifts reg0, reg8, ..., reg56 hold coefficient 0 of rows 0..7, i.e.
// the first column. The 64th coefficient is shifted in in the same cycle in which
// the pong buffer takes that column; every later column read shifts once more, so
// the same taps then carry columns 1..7. The 64th value never needs storing:
// it is read out through the taps as soon as it reaches reg56 after column 6.
// Hence: shift when a coefficient is written or a column is read.
// Interface: writeData(12)/writeEn in (no back-pressure: the 1-D DCT never has to
// wait for it), readData(96)/readEn/empty out. The column is readable when
// 63 coefficients are held and the 64th is being written (column 0), or after
// that until all eight columns have been read. The shift register and tap
// positions follow the architecture; the counters are this design's own.
module transpose_buffer
  import jpeg_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [DCT_W-1:0] writeData,
  input  logic             writeEn,
  output logic [ROW_W-1:0] readData,
  input  logic             readEn,
  output logic             empty
);
  logic [DCT_W-1:0] sreg [63];
  logic [6:0] wcnt;   // coefficients written in this block (0..64)
  logic [3:0] ccnt;   // columns read in this block (0..8)
  logic rd, shift;

  // column taps: {reg56, reg48, ..., reg0}, reg0 in bits 11:0
  always_comb
    for (int i = 0; i < 8; i++) readData[i*DCT_W +: DCT_W] = sreg[8*i];

  assign empty = !(((wcnt == 7'd63) && writeEn && (ccnt == 4'd0)) ||
                   ((wcnt == 7'd64) && (ccnt != 4'd0) && (ccnt != 4'd8)));
  assign rd    = readEn && !empty;
  assign shift = writeEn || rd;

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int i = 0; i < 62; i++) sreg[i] <= sreg[i+1];
      sreg[62] <= writeEn ? writeData : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt <= '0;
      ccnt <= '0;
    end else begin
      if (rd && ccnt == 4'd7) begin
        wcnt <= '0;
        ccnt <= '0;
      end else begin
        if (writeEn) wcnt <= wcnt + 7'd1;
        if (rd)      ccnt <= ccnt + 4'd1;
      end
    end
  end

  // A 64th coefficient must arrive together with the read of column 0.
  assert property (@(posedge clk) disable iff (rst)
                   (writeEn && wcnt == 7'd63) |-> readEn)
    else $error("transpose_buffer: 64th coefficient without column read");
  assert property (@(posedge clk) disable iff (rst) !(writeEn && wcnt == 7'd64))
    else $error("transpose_buffer: write beyond 64 coefficients");
endmodule
