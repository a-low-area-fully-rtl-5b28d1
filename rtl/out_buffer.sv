// out_buffer: two-register output buffer that decouples a pipeline stage from
// the next one.
//
// reg0 is always the word presented on readData; reg1 catches one extra word
// when the reader stalls. A three-state FSM {EMPTY, ALMOST_FULL, FULL} tracks
// the contents: EMPTY -> ALMOST_FULL on a write; in ALMOST_FULL a simultaneous
// read and write replaces reg0, a write alone fills reg1 (-> FULL), a read alone
// empties (-> EMPTY); in FULL a read moves reg1 into reg0 (-> ALMOST_FULL).
// Interface (FIFO semantics, as every block of the encoder uses):
//   writeData/writeEn/full : a word is taken at the clock edge when writeEn=1
//                            and full=0;
//   readData/readEn/empty  : readData is valid whenever empty=0; it is consumed
//                            at the edge when readEn=1 and empty=0.
// With one reader that reads every cycle it adds one cycle of latency and runs
// at one word per cycle. The FSM is the architecture's; empty is de-asserted in
// ALMOST_FULL because reg0 then holds a word.
module out_buffer #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] writeData,
  input  logic         writeEn,
  output logic         full,
  output logic [W-1:0] readData,
  input  logic         readEn,
  output logic         empty
);
  typedef enum logic [1:0] {EMPTY, ALMOST_FULL, FULL} state_e;
  state_e state;
  logic [W-1:0] reg0, reg1;
  logic wr, rd;

  assign full     = (state == FULL);
  assign empty    = (state == EMPTY);
  assign readData = reg0;
  assign wr = writeEn && !full;
  assign rd = readEn && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= EMPTY;
      reg0  <= '0;
      reg1  <= '0;
    end else begin
      unique case (state)
        EMPTY: if (wr) begin
          reg0  <= writeData;
          state <= ALMOST_FULL;
        end
        ALMOST_FULL: begin
          if (wr && rd) reg0 <= writeData;
          else if (wr) begin
            reg1  <= writeData;
            state <= FULL;
          end else if (rd) state <= EMPTY;
        end
        FULL: if (rd) begin
          reg0  <= reg1;
          state <= ALMOST_FULL;
        end
        default: state <= EMPTY;
      endcase
    end
  end
endmodule
