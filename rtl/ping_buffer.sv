// ping_buffer: serial-in / parallel-out row collector of the 2-D DCT.
//
// A 96-bit shift register under a two-state FSM {EMPTY, FULL}. In EMPTY each
// accepted 12-bit word is shifted in from the top (bits 95:84) and the register
// shifts right, so after eight words the first one sits in bits 11:0 (x0) and
// the eighth in bits 95:84 (x7). The eighth word moves the FSM to FULL, where
// the whole row is offered on readData and full=1; a read returns it to EMPTY.
// A row therefore takes eight cycles to fill plus one to hand over (72 cycles
// for an 8x8 block). Interface: writeData/writeEn/full in, readData/readEn/empty
// out, with the FIFO semantics of out_buffer. Structure and FSM follow the
// architecture; the word-counter is this design's way of spotting the eighth word.
module ping_buffer
  import jpeg_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [DCT_W-1:0]  writeData,
  input  logic              writeEn,
  output logic              full,
  output logic [ROW_W-1:0]  readData,
  input  logic              readEn,
  output logic              empty
);
  typedef enum logic {EMPTY, FULL} state_e;
  state_e state;
  logic [ROW_W-1:0] sr;
  logic [2:0] cnt;

  assign full     = (state == FULL);
  assign empty    = (state == EMPTY);
  assign readData = sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= EMPTY;
      cnt   <= '0;
      sr    <= '0;
    end else begin
      unique case (state)
        EMPTY: if (writeEn) begin
          sr  <= {writeData, sr[ROW_W-1:DCT_W]};
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) state <= FULL;
        end
        FULL: if (readEn) state <= EMPTY;
        default: state <= EMPTY;
      endcase
    end
  end
endmodule
