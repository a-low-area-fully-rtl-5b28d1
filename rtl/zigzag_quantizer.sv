// zigzag_quantizer: quantization performed while reading a block in zigzag
// order.
//
// A two-state FSM {WRITE_RAM, READ_RAM} with a 6-bit counter. In WRITE_RAM the
// 64 column-major 2-D DCT coefficients of a block are written into a 64-entry
// RAM at the counter address; the 64th write switches to READ_RAM. There the
// counter is the zigzag position k: the Zigzag Table turns it into the RAM
// address, and the Quantization Table (selected by chrom) gives
// Q*(k) = round(2048/Q) for that position. The RAM word times Q* (24-bit product)
// enters a register with a two-state {EMPTY, FULL} FSM that only advances when
// the output buffer has room; the product is then rounded to an 11-bit
// quantized coefficient (divide by 2048, jpeg_pkg::round_quant) and written to
// the output buffer. After the 64th read the FSM returns to WRITE_RAM and
// blk_done pulses. The input is blocked (full=1) during READ_RAM, so a block
// costs 64 write cycles plus 64 read cycles, well within the 144-cycle block
// period of the DCT. Interface: writeData(12)/writeEn/full, readData(11)/readEn/
// empty, chrom (table select, sampled during READ_RAM), blk_done.
// Structure follows the architecture; the asynchronous-read RAM, rounding of
// 2048/Q and saturation of the rounded result are this design's choices.
module zigzag_quantizer
  import jpeg_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [DCT_W-1:0]  writeData,
  input  logic              writeEn,
  output logic              full,
  input  logic              chrom,
  output logic [COEF_W-1:0] readData,
  input  logic              readEn,
  output logic              empty,
  output logic              blk_done
);
  localparam logic [63:0][QS_W-1:0] QSTAR_LUM = build_qstar(1'b0);
  localparam logic [63:0][QS_W-1:0] QSTAR_CHR = build_qstar(1'b1);
  localparam logic [63:0][5:0]      ZZ_ADDR   = build_zigzag_addr();

  typedef enum logic {WRITE_RAM, READ_RAM} state_e;
  state_e state;
  logic [5:0] cnt;
  logic [DCT_W-1:0] ram [64];
  logic [5:0] addr;
  logic [QS_W-1:0] qstar;
  logic signed [QP_W-1:0] prod, preg;
  logic preg_full, consume, load, ob_full;

  assign full  = (state == READ_RAM);
  assign addr  = (state == READ_RAM) ? ZZ_ADDR[cnt] : cnt;   // read ? zigzag : counter
  assign qstar = chrom ? QSTAR_CHR[cnt] : QSTAR_LUM[cnt];
  assign prod  = QP_W'($signed(ram[addr]) * $signed({1'b0, qstar}));

  assign consume = preg_full && !ob_full;
  assign load    = (state == READ_RAM) && (!preg_full || consume);
  assign blk_done = load && (cnt == 6'd63);

  always_ff @(posedge clk)
    if (state == WRITE_RAM && writeEn) ram[cnt] <= writeData;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= WRITE_RAM;
      cnt       <= '0;
      preg      <= '0;
      preg_full <= 1'b0;
    end else begin
      unique case (state)
        WRITE_RAM: if (writeEn) begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) state <= READ_RAM;
        end
        READ_RAM: if (load) begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) state <= WRITE_RAM;
        end
        default: state <= WRITE_RAM;
      endcase
      if (load)         begin preg <= prod; preg_full <= 1'b1; end
      else if (consume) preg_full <= 1'b0;
    end
  end

  out_buffer #(.W(COEF_W)) u_ob (
    .clk, .rst,
    .writeData (round_quant(preg)), .writeEn (preg_full), .full (ob_full),
    .readData (readData), .readEn (readEn), .empty (empty)
  );
endmodule
