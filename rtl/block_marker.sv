// block_marker: counter that tells which image component the next 8x8 block
// belongs to.
//
// In colour mode blocks arrive as 4:2:2 minimum coded units Y, Y, Cb, Cr, so a
// two-bit counter stepping on every block start gives the component: positions
// 0 and 1 are luminance, 2 is Cb, 3 is Cr. In grey-scale mode (color=0) every
// block is luminance. Interface: advance (one pulse per block, counted at the
// clock edge), comp/lumin for the block that starts next. The counter-based
// marker follows the architecture; the 4:2:2 order is this design's reading of
// the frame rates the core is specified for (colour = twice the grey-scale
// sample count).
module block_marker
  import jpeg_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  color,
  input  logic  advance,
  output comp_e comp,
  output logic  lumin
);
  logic [1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else if (advance) cnt <= color ? cnt + 2'd1 : 2'd0;
  end

  always_comb begin
    if (!color) comp = COMP_Y;
    else begin
      unique case (cnt)
        2'd2:    comp = COMP_CB;
        2'd3:    comp = COMP_CR;
        default: comp = COMP_Y;
      endcase
    end
  end
  assign lumin = (comp == COMP_Y);
endmodule
