// tb_ping_buffer: self-checking test of the row collector.
// Rows of eight random 12-bit words are written with random gaps and read back
// after random delays. Checks the packing (first word in bits 11:0), the
// full/empty flags of the two states, that words offered while full are not
// taken, and that a row needs at least eight write cycles.
module tb_ping_buffer;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] wdata;
  logic [95:0] rdata, expr;
  logic we, re, full, empty;
  int checks = 0, failures = 0;

  ping_buffer dut (.clk, .rst, .writeData (wdata), .writeEn (we), .full,
                   .readData (rdata), .readEn (re), .empty);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    we = 0; re = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int r = 0; r < 40; r++) begin
      t0 = $time / 10;
      for (int i = 0; i < 8; i++) begin
        if (r % 2) while ($urandom_range(0, 2) == 0) begin we = 0; @(negedge clk); end
        check(empty && !full, "filling: empty=1 full=0");
        we = 1; wdata = 12'($urandom); expr[i*12 +: 12] = wdata;
        @(negedge clk);
      end
      we = 0;
      t1 = $time / 10;
      check(t1 - t0 >= 8, "eight cycles per row");
      check(full && !empty, "full after eighth word");
      check(rdata == expr, $sformatf("row %0d: got %h exp %h", r, rdata, expr));
      // offered words while full are ignored
      we = 1; wdata = 12'hABC;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      we = 0;
      check(rdata == expr, "row unchanged while full");
      re = 1;
      @(negedge clk);
      re = 0;
      check(empty && !full, "empty after read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
