// pong_buffer: input multiplexer and 96-bit operand register of the 1-D DCT,
// and the sequencer of the row and column passes of the 2-D DCT.
//
// The register is loaded either with a row of pixels from the ping buffer
// (MuxSel=0) or with a column of 1-D coefficients from the transpose buffer
// (MuxSel=1). A four-state FSM runs the passes:
//   ONED_EMPTY  load a row from the ping buffer              (empty=1)
//   ONED_FULL   present the row with coefficient index k=0..7, one per cycle
//               accepted by the 1-D DCT; after k=7 go to ONED_EMPTY, or to
//               TWOD_EMPTY after the eighth row                (full=1)
//   TWOD_EMPTY  as ONED_EMPTY, but load a column (MuxSel=1)
//   TWOD_FULL   as ONED_FULL; after k=7 go to TWOD_EMPTY, or back to
//               ONED_EMPTY after the eighth column.
// One load cycle plus eight compute cycles per row or column gives 72 cycles
// per pass and 144 cycles per 8x8 block. Interface: row_*/col_* are FIFO read
// ports towards the ping and transpose buffers; readData/coef_idx/twod/empty
// with readEn form the FIFO output towards the 1-D DCT, which stalls the
// sequence by holding readEn low. FSM and cycle counts follow the architecture;
// the row/column counter is this design's own.
module pong_buffer
  import jpeg_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  // from the ping buffer (rows of pixels)
  input  logic [ROW_W-1:0] row_data,
  input  logic             row_empty,
  output logic             row_readEn,
  // from the transpose buffer (columns of 1-D coefficients)
  input  logic [ROW_W-1:0] col_data,
  input  logic             col_empty,
  output logic             col_readEn,
  // to the 1-D DCT
  output logic [ROW_W-1:0] readData,
  output logic [2:0]       coef_idx,
  output logic             twod,
  output logic             empty,
  output logic             full,
  input  logic             readEn,
  output logic             muxsel
);
  typedef enum logic [1:0] {ONED_EMPTY, ONED_FULL, TWOD_EMPTY, TWOD_FULL} state_e;
  state_e state;
  logic [2:0] k;    // coefficient index being computed
  logic [2:0] line; // row or column number within the pass
  logic adv;

  assign muxsel     = (state == TWOD_EMPTY) || (state == TWOD_FULL);
  assign full       = (state == ONED_FULL) || (state == TWOD_FULL);
  assign empty      = !full;
  assign twod       = (state == TWOD_FULL);
  assign coef_idx   = k;
  assign row_readEn = (state == ONED_EMPTY);
  assign col_readEn = (state == TWOD_EMPTY);
  assign adv        = full && readEn;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= ONED_EMPTY;
      k        <= '0;
      line     <= '0;
      readData <= '0;
    end else begin
      unique case (state)
        ONED_EMPTY: if (!row_empty) begin
          readData <= row_data;
          k        <= '0;
          state    <= ONED_FULL;
        end
        TWOD_EMPTY: if (!col_empty) begin
          readData <= col_data;
          k        <= '0;
          state    <= TWOD_FULL;
        end
        ONED_FULL, TWOD_FULL: if (adv) begin
          k <= k + 3'd1;
          if (k == 3'd7) begin
            line <= line + 3'd1;
            if (line == 3'd7) state <= (state == ONED_FULL) ? TWOD_EMPTY : ONED_EMPTY;
            else              state <= (state == ONED_FULL) ? ONED_EMPTY : TWOD_EMPTY;
          end
        end
        default: state <= ONED_EMPTY;
      endcase
    end
  end
endmodule
