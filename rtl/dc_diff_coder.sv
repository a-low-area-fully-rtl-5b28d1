// dc_diff_coder: differential coder of the DC coefficients.
//
// One subtractor and three registers holding the previous DC value of the Y, Cb
// and Cr components. diff = value - prev[comp] is combinational; when strobe is
// high at a clock edge, value is stored as the new prev[comp]. The predictors
// reset to zero, as at the start of a JPEG scan. The result is kept to 11 bits,
// the width the Huffman coder receives; larger DC steps would need a 12-bit
// path. The structure (one adder, three registers) follows the architecture.
module dc_diff_coder
  import jpeg_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     strobe,
  input  comp_e                    comp,
  input  logic signed [COEF_W-1:0] value,
  output logic signed [COEF_W-1:0] diff
);
  logic signed [COEF_W-1:0] prev [3];

  assign diff = value - prev[comp];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 3; i++) prev[i] <= '0;
    end else if (strobe) begin
      prev[comp] <= value;
    end
  end
endmodule
