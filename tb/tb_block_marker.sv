// tb_block_marker: checks the component sequence Y, Y, Cb, Cr, Y, ... in colour
// mode, luminance only in grey-scale mode, and that the marker holds its
// position between advance pulses.
module tb_block_marker;
  import jpeg_pkg::*;
  logic clk = 1'b0, rst = 1'b1, color, advance;
  comp_e comp;
  logic lumin;
  int checks = 0, failures = 0;

  block_marker dut (.clk, .rst, .color, .advance, .comp, .lumin);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    comp_e seq[4];
    seq = '{COMP_Y, COMP_Y, COMP_CB, COMP_CR};
    color = 1; advance = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int b = 0; b < 40; b++) begin
      @(negedge clk);
      check(comp == seq[b % 4] && lumin == (seq[b % 4] == COMP_Y), $sformatf("colour block %0d", b));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(comp == seq[b % 4], "holds between blocks");
      advance = 1;
      @(negedge clk);
      advance = 0;
    end
    rst = 1; color = 0;
    @(negedge clk);
    rst = 0;
    for (int b = 0; b < 10; b++) begin
      check(comp == COMP_Y && lumin, "grey-scale block");
      advance = 1;
      @(negedge clk);
      advance = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
