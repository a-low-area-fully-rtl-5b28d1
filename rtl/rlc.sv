// rlc: run-length coder of the 64 zigzag-ordered quantized coefficients of a
// block.
//
// Three-state FSM {DC_COEFF, AC_COEFF, INSERT_ZRL} with a 4-bit run_length
// counter, a 2-bit zrl_symbol counter and a 6-bit coefficient position:
//   DC_COEFF   takes coefficient 0 and emits {1, 0000, Z}.
//   AC_COEFF   takes coefficients 1..63. A zero increments run_length; the 16th
//              zero in a row wraps run_length to 0 and increments zrl_symbol.
//              A non-zero value is emitted as {0, run_length, Z} when no ZRL is
//              pending, otherwise it is held and the FSM goes to INSERT_ZRL.
//              A zero in position 63 emits EOB {0, 0000, 0} and drops any
//              pending run; a non-zero value in position 63 ends the block too.
//   INSERT_ZRL emits one ZRL {0, 1111, 0} per cycle while zrl_symbol is non-zero,
//              then the held value, and returns to AC_COEFF (or DC_COEFF after
//              position 63).
// Words go through a two-register output buffer. One coefficient is taken per
// cycle unless the output buffer is full; each pending ZRL costs one extra cycle.
// Interface: writeData(11)/writeEn/full in, readData(16: {dc, run, value})/
// readEn/empty out. The FSM and word format follow the architecture.
module rlc
  import jpeg_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [COEF_W-1:0] writeData,
  input  logic              writeEn,
  output logic              full,
  output rlc_word_t         readData,
  input  logic              readEn,
  output logic              empty
);
  typedef enum logic [1:0] {DC_COEFF, AC_COEFF, INSERT_ZRL} state_e;
  state_e state;
  logic [3:0] run_length;
  logic [1:0] zrl_symbol;
  logic [5:0] pos;
  logic signed [COEF_W-1:0] hold;
  logic hold_last;
  logic ob_full, take, last, is_zero;
  rlc_word_t wword;
  logic wen;

  assign full    = ob_full || (state == INSERT_ZRL);
  assign take    = writeEn && !full;
  assign last    = (pos == 6'd63);
  assign is_zero = (writeData == '0);

  // word written to the output buffer this cycle
  always_comb begin
    wen   = 1'b0;
    wword = '0;
    unique case (state)
      DC_COEFF: if (take) begin
        wen = 1'b1;
        wword = '{dc: 1'b1, run: 4'd0, value: writeData};
      end
      AC_COEFF: if (take) begin
        if (is_zero && last) begin
          wen = 1'b1;                       // EOB
          wword = '{dc: 1'b0, run: 4'd0, value: '0};
        end else if (!is_zero && zrl_symbol == 2'd0) begin
          wen = 1'b1;
          wword = '{dc: 1'b0, run: run_length, value: writeData};
        end
      end
      INSERT_ZRL: if (!ob_full) begin
        wen = 1'b1;
        if (zrl_symbol != 2'd0) wword = '{dc: 1'b0, run: 4'hf, value: '0};
        else                    wword = '{dc: 1'b0, run: run_length, value: hold};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= DC_COEFF;
      run_length <= '0;
      zrl_symbol <= '0;
      pos        <= '0;
      hold       <= '0;
      hold_last  <= 1'b0;
    end else begin
      unique case (state)
        DC_COEFF: if (take) begin
          pos        <= 6'd1;
          run_length <= '0;
          zrl_symbol <= '0;
          state      <= AC_COEFF;
        end
        AC_COEFF: if (take) begin
          pos <= pos + 6'd1;
          if (is_zero) begin
            if (last) begin
              run_length <= '0;
              zrl_symbol <= '0;
              state      <= DC_COEFF;
            end else begin
              run_length <= run_length + 4'd1;
              if (run_length == 4'hf) zrl_symbol <= zrl_symbol + 2'd1;
            end
          end else if (zrl_symbol == 2'd0) begin
            run_length <= '0;
            if (last) state <= DC_COEFF;
          end else begin
            hold      <= writeData;
            hold_last <= last;
            state     <= INSERT_ZRL;
          end
        end
        INSERT_ZRL: if (!ob_full) begin
          if (zrl_symbol != 2'd0) zrl_symbol <= zrl_symbol - 2'd1;
          else begin
            run_length <= '0;
            state      <= hold_last ? DC_COEFF : AC_COEFF;
          end
        end
        default: state <= DC_COEFF;
      endcase
    end
  end

  out_buffer #(.W(RLC_W)) u_ob (
    .clk, .rst,
    .writeData (wword), .writeEn (wen), .full (ob_full),
    .readData (readData), .readEn (readEn), .empty (empty)
  );
endmodule
