// dct_1d: time-shared eight-point 1-D DCT computing one coefficient per cycle.
//
// For coefficient index k the four Add/Sub units form x_j + x_(7-j) (k even,
// OddSel=0) or x_j - x_(7-j) (k odd, OddSel=1), j=0..3, with x_j in bits
// 12j+11:12j of writeData. Four 12x10-bit signed multipliers scale them by the
// row k of an 8x40-bit weight table ({w3,w2,w1,w0}, weights 0.5cos(n*pi/16)
// scaled by 1024). The four 22-bit products and a pass tag go into an 88-bit
// pipeline register with a two-state {EMPTY, FULL} FSM. From the register, each
// product is rounded to 12 bits (jpeg_pkg::round_prod) and a two-level adder
// tree gives the coefficient. Row-pass (1-D) results go to the transpose buffer,
// which always accepts; column-pass (2-D) results go to the output buffer and the
// register only advances when that buffer is not full (full is then raised
// towards the pong buffer).
// Latency: one cycle from an accepted operand to the coefficient on coef_out.
// Structure, widths and rounding follow the architecture; the weight scale of
// 1024 is this design's choice (it matches the 10 bits the rounding drops).
module dct_1d
  import jpeg_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [ROW_W-1:0] writeData,
  input  logic [2:0]       coef_idx,
  input  logic             twod_in,
  input  logic             writeEn,
  output logic             full,
  // result
  output logic [DCT_W-1:0] coef_out,
  output logic             tr_writeEn,     // 1-D coefficient to transpose buffer
  output logic             ob_writeEn,     // 2-D coefficient to output buffer
  input  logic             ob_full         // output buffer full
);
  typedef enum logic {EMPTY, FULL} state_e;
  state_e state;
  logic twod_r;
  logic signed [PROD_W-1:0] prod [4];
  logic [4*PROD_W-1:0] preg;   // the 88-bit register
  logic [4*WGT_W-1:0] w;
  logic consume, load;

  assign w = dct_weights(coef_idx);

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      logic signed [DCT_W-1:0] i0, i1, o;
      i0 = writeData[j*DCT_W +: DCT_W];
      i1 = writeData[(7-j)*DCT_W +: DCT_W];
      o  = coef_idx[0] ? (i0 - i1) : (i0 + i1);
      prod[j] = o * $signed(w[j*WGT_W +: WGT_W]);
    end
  end

  assign consume = (state == FULL) && (!twod_r || !ob_full);
  assign load    = writeEn && ((state == EMPTY) || consume);
  assign full    = (state == FULL) && !consume;

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= EMPTY;
      twod_r <= 1'b0;
      preg   <= '0;
    end else if (load) begin
      state  <= FULL;
      twod_r <= twod_in;
      preg   <= {prod[3], prod[2], prod[1], prod[0]};
    end else if (consume) begin
      state <= EMPTY;
    end
  end

  // rounding and adder tree
  logic signed [DCT_W-1:0] rnd [4];
  always_comb begin
    for (int j = 0; j < 4; j++) rnd[j] = round_prod(preg[j*PROD_W +: PROD_W]);
    coef_out = (rnd[0] + rnd[1]) + (rnd[2] + rnd[3]);
  end

  assign tr_writeEn = (state == FULL) && !twod_r;
  assign ob_writeEn = (state == FULL) && twod_r;
endmodule
