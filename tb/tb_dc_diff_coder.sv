// tb_dc_diff_coder: random DC values for random components; diff must be the
// value minus the previous DC of the same component (zero after reset), and a
// cycle without strobe must leave the predictors unchanged.
module tb_dc_diff_coder;
  import jpeg_pkg::*;
  logic clk = 1'b0, rst = 1'b1, strobe;
  comp_e comp;
  logic signed [10:0] value, diff;
  int checks = 0, failures = 0;
  int prev[3];

  dc_diff_coder dut (.clk, .rst, .strobe, .comp, .value, .diff);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '{0, 0, 0};
    strobe = 0; comp = COMP_Y; value = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      comp   = comp_e'($urandom_range(0, 2));
      value  = 11'(int'($urandom_range(0, 1000)) - 500);
      strobe = ($urandom_range(0, 3) != 0);
      #1 check(diff == 11'(int'(value) - prev[comp]), $sformatf("diff %0d", diff));
      if (strobe) prev[comp] = int'(value);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
