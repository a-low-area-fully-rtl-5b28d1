// tb_transpose_buffer: self-checking test of the shift-register transpose.
// Each block writes 64 row-ordered coefficients, one per cycle as the 1-D DCT
// does, the 64th together with the read of column 0; then columns 1..7 are read
// with random gaps. Every column must equal {c[56+u], ..., c[8+u], c[u]} and
// the buffer must not offer a column before it is complete.
module tb_transpose_buffer;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] wdata;
  logic [95:0] rdata;
  logic we, re, empty;
  int checks = 0, failures = 0;
  int c[64];

  transpose_buffer dut (.clk, .rst, .writeData (wdata), .writeEn (we),
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

  function automatic logic [95:0] col(int u);
    logic [95:0] v;
    for (int r = 0; r < 8; r++) v[r*12 +: 12] = 12'(c[r*8+u]);
    return v;
  endfunction

  initial begin
    we = 0; re = 0; wdata = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int b = 0; b < 20; b++) begin
      for (int i = 0; i < 64; i++) c[i] = int'($urandom_range(0, 4095));
      for (int i = 0; i < 63; i++) begin
        we = 1; wdata = 12'(c[i]);
        #1 check(empty, "no column before the block is complete");
        @(negedge clk);
      end
      we = 1; wdata = 12'(c[63]); re = 1;
      #1 check(!empty, "column 0 offered with the 64th write");
      check(rdata == col(0), $sformatf("blk %0d col 0: %h vs %h", b, rdata, col(0)));
      @(negedge clk);
      we = 0; re = 0;
      for (int u = 1; u < 8; u++) begin
        repeat ($urandom_range(0, 9)) @(negedge clk);
        check(!empty && rdata == col(u), $sformatf("blk %0d col %0d", b, u));
        re = 1;
        @(negedge clk);
        re = 0;
      end
      #1 check(empty, "empty after eight columns");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
